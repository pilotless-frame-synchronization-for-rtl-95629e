// tb_sync_counter: steps the offset counter with random gaps and compares (mu, i, last)
// with a reference count, including the wrap after the last position and a clear.
module tb_sync_counter;
  localparam int unsigned N = 13;
  localparam int unsigned M = 3;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, step = 1'b0;
  logic [$clog2(N)-1:0] mu;
  logic [$clog2(M)-1:0] frame;
  logic last;
  int checks = 0, failures = 0;
  int unsigned pos = 0;   // reference position j = mu + i*N
  int wraps = 0;

  sync_counter #(.N(N), .M(M)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      checks++;
      if (mu != pos % N || frame != pos / N || last != (pos == N * M - 1)) begin
        failures++;
        $display("FAIL pos %0d: mu %0d frame %0d last %0d", pos, mu, frame, last);
      end
      step = 1'($urandom % 4 != 0);
      clear = (t == 250);
      @(posedge clk); #1;
      if (clear) pos = 0;
      else if (step) begin
        if (pos == N * M - 1) wraps++;
        pos = (pos + 1) % (N * M);
      end
    end
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("FAIL: no wrap");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
