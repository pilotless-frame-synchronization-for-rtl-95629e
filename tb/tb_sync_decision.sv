// tb_sync_decision: feeds sequences of per-offset totals to the comparator in both methods
// and checks min_U, min_mu, seen and hit against a reference after every offset: strict
// minimum with the lowest offset winning ties, first offset at or below the threshold, and
// no update after a threshold hit or without valid.
module tb_sync_decision;
  import ldpc_sync_pkg::*;
  localparam int unsigned N = 50;
  localparam int unsigned SUM_W = 8;
  localparam int unsigned MU_W = $clog2(N);
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, valid = 1'b0;
  sync_method_e method = METHOD_MAXIMUM;
  logic [SUM_W-1:0] u_thresh = '0, total = '0, min_u;
  logic [MU_W-1:0] mu = '0, min_mu;
  logic seen, hit, update;
  int checks = 0, failures = 0, ties = 0;

  sync_decision #(.N(N), .SUM_W(SUM_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int run = 0; run < 40; run++) begin
      int unsigned r_min, r_mu, r_seen, r_hit;
      r_min = 0; r_mu = 0; r_seen = 0; r_hit = 0;
      method = (run % 2) ? METHOD_THRESHOLD : METHOD_MAXIMUM;
      u_thresh = SUM_W'(20 + $urandom % 40);
      @(negedge clk) clear = 1'b1;
      @(negedge clk) clear = 1'b0;
      for (int unsigned o = 0; o < N; o++) begin
        @(negedge clk);
        valid = 1'($urandom % 5 != 0);
        total = SUM_W'(30 + $urandom % 60);
        mu = MU_W'(o);
        if (valid) begin
          if (method == METHOD_MAXIMUM) begin
            if (r_seen && total == r_min) ties++;
            if (!r_seen || total < r_min) begin r_min = total; r_mu = o; r_seen = 1; end
          end else if (!r_hit && total <= u_thresh) begin
            r_min = total; r_mu = o; r_seen = 1; r_hit = 1;
          end
        end
        @(posedge clk); #1;
        checks++;
        if (seen != r_seen[0] || hit != r_hit[0] || (r_seen && (min_u != r_min || min_mu != r_mu))) begin
          failures++;
          $display("FAIL run %0d offset %0d: min_u %0d/%0d mu %0d/%0d seen %0d hit %0d",
                   run, o, min_u, r_min, min_mu, r_mu, seen, hit);
        end
      end
      valid = 1'b0;
    end
    checks++;
    if (ties == 0) begin
      failures++;
      $display("FAIL: no tie exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
