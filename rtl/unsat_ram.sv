// unsat_ram: dual-port RAM U_0..U_{N-1} of per-offset unsatisfied-constraint sums.
//
// One write port and one read port, both synchronous: rd_data shows the word at the rd_addr
// of the previous enabled read. With the read issued one cycle ahead, the synchronizer reads
// U_mu, adds the new count and writes the sum back in one cycle per offset, which is what the
// source uses a dual-port RAM for. The registered read is this design's choice (it maps onto
// block RAM). A read and a write of the same address in one cycle return the old word. The
// contents are not reset; the owner writes every word before it reads it.
module unsat_ram #(
  parameter int unsigned DEPTH  = 1944,   // one word per offset
  parameter int unsigned WIDTH  = 11,     // sum over M frames of up to Nc unsatisfied
  localparam int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [WIDTH-1:0]  wr_data,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [WIDTH-1:0]  rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
