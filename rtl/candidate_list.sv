// candidate_list: keeps the GAMMA best frame-offset candidates of the list method's first stage.
//
// Offsets arrive one per valid cycle with their total of unsatisfied constraints. The list is
// kept sorted by total, smallest first, in a row of GAMMA registers: a new candidate goes in
// front of the first entry with a larger total (after entries with an equal one, so earlier
// offsets win ties), the entries behind it move back by one and the last one drops out. This
// is the insertion shift register of a systolic priority list, chosen here because the source
// only says that the Gamma most probable offsets are kept. The match output tells the second
// stage whether offset query_mu is one of the kept candidates (GAMMA parallel comparators).
// Updates take effect at the clock edge after the valid cycle; clear empties the list.
// Synchronous, active-low reset.
module candidate_list #(
  parameter int unsigned GAMMA = 100,     // list length
  parameter int unsigned N     = 1944,    // offsets
  parameter int unsigned SUM_W = 11,      // width of a total
  localparam int unsigned MU_W = $clog2(N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             valid,       // insert (total, mu)
  input  logic [SUM_W-1:0] total,
  input  logic [MU_W-1:0]  mu,
  input  logic [MU_W-1:0]  query_mu,    // offset asked about by the second stage
  output logic             match,       // query_mu is in the list
  output logic [MU_W-1:0]  cand_mu  [GAMMA],  // kept offsets, best first
  output logic [SUM_W-1:0] cand_u   [GAMMA],  // their totals
  output logic [GAMMA-1:0] cand_vld           // entry holds a candidate
);

  logic [GAMMA-1:0] better;   // new total beats entry i (or entry i is empty)
  for (genvar i = 0; i < GAMMA; i++) begin : g_cmp
    assign better[i] = !cand_vld[i] || (total < cand_u[i]);
  end

  for (genvar i = 0; i < GAMMA; i++) begin : g_entry
    always_ff @(posedge clk) begin
      if (!rst_n || clear) begin
        cand_vld[i] <= 1'b0;
        cand_u[i]   <= '0;
        cand_mu[i]  <= '0;
      end else if (valid && better[i]) begin
        if (i == 0 || !better[(i == 0) ? 0 : i - 1]) begin
          cand_vld[i] <= 1'b1;
          cand_u[i]   <= total;
          cand_mu[i]  <= mu;
        end else begin
          cand_vld[i] <= cand_vld[(i == 0) ? 0 : i - 1];
          cand_u[i]   <= cand_u[(i == 0) ? 0 : i - 1];
          cand_mu[i]  <= cand_mu[(i == 0) ? 0 : i - 1];
        end
      end
    end
  end

  always_comb begin
    match = 1'b0;
    for (int i = 0; i < GAMMA; i++) begin
      if (cand_vld[i] && cand_mu[i] == query_mu) match = 1'b1;
    end
  end

endmodule
