// sync_decision: the comparator with its min_U and min_mu registers.
//
// Each valid cycle presents the unsatisfied-constraint total of one offset, summed over the M
// frames, in increasing offset order. In the maximum method the comparator keeps the smallest
// total seen (min_U) and its offset (min_mu), updating only when the new total is strictly
// smaller, so among equal totals the lowest offset wins; fewest unsatisfied constraints is the
// same as most satisfied ones. In the threshold method the first offset whose total is at or
// below u_thresh is taken and the unit stops updating (hit goes high); with theta satisfied
// constraints required out of Nc_active*M examined, u_thresh = Nc_active*M - theta.
// The list method's second stage is a maximum search and uses the same rule.
// The maximum-method structure follows the source; the threshold variant is the source's rule
// put on the same registers. clear (start of an acquisition) empties the registers.
// The registers update at the clock edge after the valid cycle. Synchronous, active-low reset.
module sync_decision
  import ldpc_sync_pkg::*;
#(
  parameter int unsigned N     = 1944,  // offsets
  parameter int unsigned SUM_W = 11,    // width of a total
  localparam int unsigned MU_W = $clog2(N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  sync_method_e     method,
  input  logic [SUM_W-1:0] u_thresh,    // threshold method: largest accepted total
  input  logic             valid,       // a total is presented
  input  logic [SUM_W-1:0] total,       // unsatisfied constraints over M frames
  input  logic [MU_W-1:0]  mu,          // its offset
  output logic [SUM_W-1:0] min_u,       // best total so far
  output logic [MU_W-1:0]  min_mu,      // its offset: the estimate mu_hat
  output logic             seen,        // at least one offset recorded
  output logic             hit,         // threshold method: an offset met the bound
  output logic             update       // comparator enable: registers load this cycle
);

  logic less;
  assign less = !seen || (total < min_u);

  always_comb begin
    update = 1'b0;
    if (valid) begin
      if (method != METHOD_THRESHOLD) update = less;
      else                          update = !hit && (total <= u_thresh);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      min_u  <= '1;
      min_mu <= '0;
      seen   <= 1'b0;
      hit    <= 1'b0;
    end else if (update) begin
      min_u  <= total;
      min_mu <= mu;
      seen   <= 1'b1;
      hit    <= (method == METHOD_THRESHOLD);
    end
  end

endmodule
