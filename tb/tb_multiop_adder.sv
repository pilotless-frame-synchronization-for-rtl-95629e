// tb_multiop_adder: checks the multioperand adder at the full width (972 operands) against
// a population count, with random, all-zero, all-one and single-one inputs.
module tb_multiop_adder;
  localparam int unsigned N_IN = 972;
  localparam int unsigned SUM_W = $clog2(N_IN + 1);
  logic [N_IN-1:0] operands;
  logic [SUM_W-1:0] sum;
  int checks = 0, failures = 0;

  multiop_adder #(.N_IN(N_IN)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [N_IN-1:0] v);
    int unsigned expected = 0;
    operands = v;
    for (int i = 0; i < N_IN; i++) expected += v[i];
    #1;
    checks++;
    if (sum != SUM_W'(expected)) begin
      failures++;
      $display("FAIL: sum %0d expected %0d", sum, expected);
    end
  endtask

  initial begin
    logic [N_IN-1:0] v;
    apply('0);
    apply('1);
    for (int i = 0; i < N_IN; i += 97) begin
      v = '0;
      v[i] = 1'b1;
      apply(v);
    end
    for (int t = 0; t < 200; t++) begin
      int unsigned density;
      density = $urandom % 100;
      for (int i = 0; i < N_IN; i++) v[i] = ($urandom % 100) < density;
      apply(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
