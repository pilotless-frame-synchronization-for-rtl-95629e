// tb_candidate_list: streams random (total, offset) pairs into the candidate list and, after
// every insertion, compares the whole list with a reference: the GAMMA smallest totals so
// far, sorted, with earlier offsets ahead of later ones on equal totals. It also checks the
// membership output for listed and unlisted offsets.
module tb_candidate_list;
  localparam int unsigned GAMMA = 8;
  localparam int unsigned N = 64;
  localparam int unsigned SUM_W = 6;
  localparam int unsigned MU_W = $clog2(N);
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, valid = 1'b0;
  logic [SUM_W-1:0] total = '0;
  logic [MU_W-1:0] mu = '0, query_mu = '0;
  logic match;
  logic [MU_W-1:0] cand_mu [GAMMA];
  logic [SUM_W-1:0] cand_u [GAMMA];
  logic [GAMMA-1:0] cand_vld;
  int checks = 0, failures = 0;

  candidate_list #(.GAMMA(GAMMA), .N(N), .SUM_W(SUM_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned ref_u [$];
  int unsigned ref_mu [$];

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int run = 0; run < 20; run++) begin
      @(negedge clk) clear = 1'b1;
      @(negedge clk) clear = 1'b0;
      ref_u.delete();
      ref_mu.delete();
      for (int unsigned o = 0; o < N; o++) begin
        int unsigned pos;
        @(negedge clk);
        valid = 1'($urandom % 4 != 0);
        total = SUM_W'($urandom % 24);
        mu = MU_W'(o);
        query_mu = MU_W'($urandom % N);
        // membership before the update
        begin
          bit exp_match;
          exp_match = 0;
          foreach (ref_mu[i]) if (ref_mu[i] == query_mu) exp_match = 1;
          #1;
          checks++;
          if (match != exp_match) begin
            failures++;
            $display("FAIL run %0d: match %0d for %0d", run, match, query_mu);
          end
        end
        if (valid) begin
          pos = 0;
          while (pos < ref_u.size() && ref_u[pos] <= total) pos++;
          ref_u.insert(pos, total);
          ref_mu.insert(pos, o);
          if (ref_u.size() > GAMMA) begin
            void'(ref_u.pop_back());
            void'(ref_mu.pop_back());
          end
        end
        @(posedge clk); #1;
        for (int i = 0; i < GAMMA; i++) begin
          checks++;
          if (cand_vld[i] != (i < ref_u.size()) ||
              (i < ref_u.size() && (cand_u[i] != ref_u[i] || cand_mu[i] != ref_mu[i]))) begin
            failures++;
            $display("FAIL run %0d offset %0d entry %0d", run, o, i);
          end
        end
      end
      valid = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
