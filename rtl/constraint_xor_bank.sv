// constraint_xor_bank: one multioperand XOR block per LDPC constraint.
//
// For each of the Nc = 12*Z constraints of the quasi-cyclic code in ldpc_sync_pkg, the block
// XORs the window bits the constraint connects to, together with the constraint's bit S_c of
// the target syndrome. Frames are scrambled by a frame-aligned pseudo-noise sequence z, so a
// correctly aligned, error-free frame gives the syndrome S = zH rather than zero; XORing S_c
// in makes each output 0 when its constraint is satisfied and 1 when it is not. This is the
// structure of the source architecture. The per-constraint enable, which lets a subset of the
// constraints be examined (the fraction F_Nc of the source), is this design's way of
// selecting that subset: a disabled constraint always reads as satisfied.
// Purely combinational; every output depends on up to 8 window bits.
module constraint_xor_bank
  import ldpc_sync_pkg::*;
#(
  parameter int unsigned Z  = Z_DEFAULT,   // circulant size
  localparam int unsigned N  = NB * Z,     // variables (frame length)
  localparam int unsigned NC = MB * Z      // constraints
) (
  input  logic [N-1:0]  window,   // window[t] = r_{i+t}
  input  logic [NC-1:0] syndrome, // S, the syndrome the aligned frame must satisfy
  input  logic [NC-1:0] con_en,   // 1: constraint is examined
  output logic [NC-1:0] unsat     // 1: constraint examined and not satisfied
);

  for (genvar br = 0; br < MB; br++) begin : g_row
    for (genvar k = 0; k < Z; k++) begin : g_con
      localparam int unsigned C = br * Z + k;
      logic parity;
      always_comb begin
        parity = syndrome[C];
        for (int unsigned bc = 0; bc < NB; bc++) begin
          if (BASE[br][bc] >= 0) parity = parity ^ window[var_index(br, k, bc, Z)];
        end
      end
      assign unsat[C] = parity & con_en[C];
    end
  end

endmodule
