// tb_sync_shift_reg: checks that the window holds the last N bits shifted in, oldest first,
// and that it holds its contents on cycles without shift_en.
module tb_sync_shift_reg;
  localparam int unsigned N = 37;
  logic clk = 1'b0, shift_en = 1'b0, bit_in = 1'b0;
  logic [N-1:0] window;
  int checks = 0, failures = 0;
  bit hist [$];

  sync_shift_reg #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      shift_en = 1'($urandom % 3 != 0);
      bit_in = 1'($urandom);
      if (shift_en) hist.push_back(bit_in);
      @(posedge clk); #1;
      if (hist.size() >= N) begin
        bit ok = 1;
        for (int i = 0; i < N; i++)
          if (window[i] != hist[hist.size() - N + i]) ok = 0;
        checks++;
        if (!ok) begin
          failures++;
          $display("FAIL at step %0d", t);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
