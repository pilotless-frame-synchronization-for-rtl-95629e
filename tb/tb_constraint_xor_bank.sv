// tb_constraint_xor_bank: checks every constraint output of the XOR bank against parities
// computed here from the base matrix: random windows, random syndromes and enables, plus
// single-bit windows that show which constraints each variable feeds (its column weight).
module tb_constraint_xor_bank;
  import ldpc_sync_pkg::*;
  localparam int unsigned Z  = 7;
  localparam int unsigned N  = NB * Z;
  localparam int unsigned NC = MB * Z;
  logic [N-1:0] window;
  logic [NC-1:0] syndrome, con_en, unsat;
  int checks = 0, failures = 0;

  constraint_xor_bank #(.Z(Z)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NC-1:0] model(logic [N-1:0] w, logic [NC-1:0] s, logic [NC-1:0] e);
    logic [NC-1:0] r;
    for (int unsigned br = 0; br < MB; br++)
      for (int unsigned k = 0; k < Z; k++) begin
        logic p = s[br * Z + k];
        for (int unsigned bc = 0; bc < NB; bc++)
          if (BASE[br][bc] >= 0) p ^= w[bc * Z + (k + BASE[br][bc]) % Z];
        r[br * Z + k] = p & e[br * Z + k];
      end
    return r;
  endfunction

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < N; i++) window[i] = 1'($urandom);
      for (int i = 0; i < NC; i++) begin
        syndrome[i] = 1'($urandom);
        con_en[i] = (t < 100) ? 1'b1 : 1'($urandom);
      end
      #1;
      checks++;
      if (unsat !== model(window, syndrome, con_en)) begin
        failures++;
        $display("FAIL random vector %0d", t);
      end
    end
    // one variable set at a time: it must upset exactly its column weight of constraints
    syndrome = '0;
    con_en = '1;
    for (int unsigned v = 0; v < N; v++) begin
      int unsigned weight;
      weight = 0;
      window = '0;
      window[v] = 1'b1;
      for (int unsigned br = 0; br < MB; br++) if (BASE[br][v / Z] >= 0) weight++;
      #1;
      checks++;
      if ($countones(unsat) != weight || unsat !== model(window, syndrome, con_en)) begin
        failures++;
        $display("FAIL single variable %0d: %0d ones, weight %0d", v, $countones(unsat), weight);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
