// tb_unsat_ram: writes and reads the dual-port RAM at the full size (1944 x 11 bits) against
// a reference array: registered read, read and write in the same cycle (old word returned),
// and a read-modify-write pass like the synchronizer's.
module tb_unsat_ram;
  localparam int unsigned DEPTH = 1944;
  localparam int unsigned WIDTH = 11;
  localparam int unsigned AW = $clog2(DEPTH);
  logic clk = 1'b0, wr_en = 1'b0, rd_en = 1'b0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic [WIDTH-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  unsat_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] expect_q;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = AW'(a); wr_data = WIDTH'($urandom);
      ref_mem[a] = wr_data;
    end
    @(negedge clk) wr_en = 1'b0;
    // random reads with simultaneous random writes
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      rd_en = 1'b1; rd_addr = AW'($urandom % DEPTH);
      wr_en = 1'($urandom); wr_addr = (t % 5 == 0) ? rd_addr : AW'($urandom % DEPTH);
      wr_data = WIDTH'($urandom);
      expect_q = ref_mem[rd_addr];
      if (wr_en) ref_mem[wr_addr] = wr_data;
      @(posedge clk); #1;
      checks++;
      if (rd_data != expect_q) begin
        failures++;
        $display("FAIL read %0d: %0d expected %0d", rd_addr, rd_data, expect_q);
      end
    end
    // rd_en low holds the output
    @(negedge clk) rd_en = 1'b0; wr_en = 1'b0; expect_q = rd_data; rd_addr = rd_addr + 1'b1;
    @(posedge clk); #1;
    checks++;
    if (rd_data != expect_q) begin
      failures++;
      $display("FAIL: output changed without rd_en");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
