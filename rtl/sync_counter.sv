// sync_counter: the offset counter of the synchronizer.
//
// It steps through the window positions j = mu + i*N in the order they arrive: mu counts
// 0..N-1 and is the RAM address of the per-offset partial sums, i counts the frames
// 0..M-1. `last` marks the final position (mu = N-1, i = M-1); a step there wraps to zero.
// The source shows a counter that addresses the RAM; splitting it into an offset and a frame
// index is this design's choice. clear has priority over step. Synchronous, active-low reset.
module sync_counter #(
  parameter int unsigned N = 1944,   // offsets per frame
  parameter int unsigned M = 2,      // frames observed per offset
  localparam int unsigned MU_W = $clog2(N),
  localparam int unsigned FR_W = (M > 1) ? $clog2(M) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,     // back to mu = 0, i = 0
  input  logic            step,      // advance by one position
  output logic [MU_W-1:0] mu,        // offset (RAM address)
  output logic [FR_W-1:0] frame,     // frame index i
  output logic            last       // mu = N-1 and i = M-1
);

  logic mu_wrap;
  assign mu_wrap = (mu == MU_W'(N - 1));
  assign last    = mu_wrap && (frame == FR_W'(M - 1));

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      mu    <= '0;
      frame <= '0;
    end else if (step) begin
      if (mu_wrap) begin
        mu    <= '0;
        frame <= last ? '0 : frame + 1'b1;
      end else begin
        mu <= mu + 1'b1;
      end
    end
  end

endmodule
