// tb_frame_buffer: writes a full acquisition of bits (5832 at the default size) into the
// receive buffer and reads them back in order and at random, checking each read one cycle
// after its address, and that the output holds while rd_en is low.
module tb_frame_buffer;
  localparam int unsigned DEPTH = 5832;
  localparam int unsigned AW = $clog2(DEPTH);
  logic clk = 1'b0, wr_en = 1'b0, wr_bit = 1'b0, rd_en = 1'b0, rd_bit;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  bit ref_mem [DEPTH];
  int checks = 0, failures = 0;

  frame_buffer #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check(input int unsigned a);
    bit exp_bit;
    @(negedge clk);
    rd_en = 1'b1;
    rd_addr = AW'(a);
    exp_bit = ref_mem[a];
    @(posedge clk); #1;
    checks++;
    if (rd_bit != exp_bit) begin
      failures++;
      $display("FAIL address %0d", a);
    end
  endtask

  initial begin
    for (int unsigned a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = AW'(a); wr_bit = 1'($urandom);
      ref_mem[a] = wr_bit;
    end
    @(negedge clk) wr_en = 1'b0;
    for (int unsigned a = 0; a < DEPTH; a++) read_check(a);
    for (int t = 0; t < 2000; t++) read_check($urandom % DEPTH);
    begin
      bit held;
      @(negedge clk);
      held = rd_bit;
      rd_en = 1'b0;
      rd_addr = rd_addr + 1'b1;
      repeat (3) @(posedge clk);
      #1;
      checks++;
      if (rd_bit != held) begin
        failures++;
        $display("FAIL: output changed without rd_en");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
