// frame_buffer: the receive buffer of hard decisions for the list method's second pass.
//
// It stores the bits r_0, r_1, ... of one acquisition as they arrive (write port) and plays
// them back in the same order (read port) so that the second stage can examine the same M
// frames again with a different set of constraints. DEPTH = N*(M+1) bits is the buffer of the
// source's synchronizer; holding it in a 1-bit-wide dual-port RAM with a registered read
// (rd_bit follows rd_addr by one cycle) is this design's choice. Contents are not reset.
module frame_buffer #(
  parameter int unsigned DEPTH  = 5832,   // N*(M+1) bits
  localparam int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic              wr_bit,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic              rd_bit
);

  logic mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_bit;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_bit <= mem[rd_addr];
  end

endmodule
