// sync_shift_reg: the N-bit shift register that holds the synchronizer's observation window.
//
// Received hard-decision bits arrive one per clock when shift_en is high. The register keeps
// the last N of them, so that window[t] = r_{i+t}: window[0] is the oldest bit r_i and
// window[N-1] the bit that arrived last, r_{i+N-1}. Every constraint XOR block reads its
// variables straight from this window. The register follows the source architecture; the
// bit order of the window and the enable are this design's choices. There is no reset:
// the owner discards windows until N bits have been shifted in.
module sync_shift_reg #(
  parameter int unsigned N = 1944   // frame length in bits
) (
  input  logic         clk,
  input  logic         shift_en,    // take bit_in this cycle
  input  logic         bit_in,      // next received hard decision
  output logic [N-1:0] window       // window[t] = r_{i+t}
);

  always_ff @(posedge clk) begin
    if (shift_en) window <= {bit_in, window[N-1:1]};
  end

endmodule
