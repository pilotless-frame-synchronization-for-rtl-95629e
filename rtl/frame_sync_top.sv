// frame_sync_top: pilotless frame synchronizer for a quasi-cyclic LDPC code.
//
// The transmitter sends LDPC codewords with no pilot symbols, each XORed with a pseudo-noise
// sequence that restarts at the frame boundary. The receiver does not know where a frame
// starts. For every candidate offset mu in 0..N-1 this unit takes the N hard decisions
// starting at mu, evaluates the parity constraints against S = zH (the syndrome of the PN
// sequence), and counts the unsatisfied ones. Summed over M consecutive frames, this total
// drives one of three decision rules, chosen per acquisition:
//   maximum    the offset with the smallest total (most satisfied constraints) is mu_hat;
//   threshold  the first offset whose total is at or below u_thresh is mu_hat, and the
//              acquisition ends there; if none qualifies, found stays low;
//   list       stage 1 examines the constraints in con_en_s1 and keeps the GAMMA offsets with
//              the smallest totals; stage 2 replays the same received bits from the frame
//              buffer, examines the constraints in con_en, and takes the best listed offset.
//
// Datapath, one window position (offset mu of frame i, j = mu + i*N) per clock:
//   stage A  sync_shift_reg holds r_j..r_{j+N-1}; sync_counter labels the window (mu, i).
//   stage B  constraint_xor_bank + multiop_adder give U (unsatisfied constraints) while the
//            RAM word U_mu is read.
//   stage C  total = U + U_mu (U alone for frame 0). For frames 0..M-2 the total is written
//            back to U_mu; for frame M-1 it goes to sync_decision (comparator, min_U, min_mu)
//            or, in list stage 1, to candidate_list.
// The maximum-method datapath is the source's architecture. The pipeline registers, the
// start/busy/done control, the per-constraint enables, the threshold given as a count of
// unsatisfied constraints, and the way the list method reuses the datapath (replay from
// frame_buffer, candidate membership gating the comparator) are this design's choices.
//
// Interface and timing: pulse start (method and u_thresh valid) to begin an acquisition.
// One received bit is taken per cycle in which bit_valid and bit_ready are both high; the
// first N-1 bits only fill the window, and after N*(M+1)-1 bits bit_ready drops. done pulses
// for one cycle in the third cycle after the one presenting the last bit (maximum), or after
// the bit that completes the first passing window (threshold). In the list method stage 2
// starts on its own once stage 1 has drained and takes N*(M+1)+4 more cycles, so done comes
// N*(M+1)+6 cycles after the cycle presenting the last input bit. mu_hat, min_u and found then hold until the
// next start. syndrome, con_en and con_en_s1 must be stable during an acquisition.
module frame_sync_top
  import ldpc_sync_pkg::*;
#(
  parameter int unsigned Z     = Z_DEFAULT,  // circulant size: N = 24*Z, Nc = 12*Z
  parameter int unsigned M     = 2,          // frames observed per offset
  parameter int unsigned GAMMA = 100,        // list method: candidates kept by stage 1
  localparam int unsigned N     = NB * Z,
  localparam int unsigned NC    = MB * Z,
  localparam int unsigned L     = N * (M + 1),   // receive buffer length
  localparam int unsigned MU_W  = $clog2(N),
  localparam int unsigned FR_W  = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned BUF_W = $clog2(L),
  localparam int unsigned U_W   = $clog2(NC + 1),
  localparam int unsigned SUM_W = $clog2(M * NC + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // configuration
  input  logic [NC-1:0]    syndrome,   // S = zH, one bit per constraint
  input  logic [NC-1:0]    con_en,     // constraints examined (list method: stage 2)
  input  logic [NC-1:0]    con_en_s1,  // constraints examined by list stage 1
  input  sync_method_e     method,     // sampled at start
  input  logic [SUM_W-1:0] u_thresh,   // threshold method bound, sampled at start
  // control
  input  logic             start,
  output logic             busy,
  output logic             done,
  // received hard decisions
  input  logic             bit_valid,
  input  logic             bit_in,
  output logic             bit_ready,
  // result
  output logic [MU_W-1:0]  mu_hat,
  output logic [SUM_W-1:0] min_u,
  output logic             found
);

  // ---------------- control ----------------
  sync_method_e     method_q;
  logic [SUM_W-1:0] u_thresh_q;
  logic             is_list;
  logic             stage2;        // list method, second pass over the buffered bits
  logic             restart;       // clear the window and position for a new pass
  logic             in_done;       // every window position of this pass has been formed
  logic [MU_W-1:0]  fill_cnt;      // bits taken so far while the window fills
  logic             full;          // N-1 bits are in: the next bit completes a window
  logic             accept;        // input bit taken
  logic             take;          // bit shifted into the window (input or replay)
  logic             take_bit;

  assign is_list   = (method_q == METHOD_LIST);
  assign bit_ready = busy && !in_done && !stage2;
  assign accept    = bit_valid && bit_ready;
  assign full      = (fill_cnt == MU_W'(N - 1));

  // ---------------- receive buffer and replay (list method) ----------------
  logic [BUF_W-1:0] wr_ptr, rd_ptr;
  logic             replay_req, replay_q, replay_bit;

  assign replay_req = stage2 && !in_done && (rd_ptr != BUF_W'(L - 1)) && !restart;

  frame_buffer #(.DEPTH(L)) u_buf (
    .clk(clk),
    .wr_en(accept), .wr_addr(wr_ptr), .wr_bit(bit_in),
    .rd_en(replay_req), .rd_addr(rd_ptr), .rd_bit(replay_bit)
  );

  always_ff @(posedge clk) begin
    if (!rst_n || start) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      replay_q <= 1'b0;
    end else begin
      if (accept) wr_ptr <= wr_ptr + 1'b1;
      if (replay_req) rd_ptr <= rd_ptr + 1'b1;
      replay_q <= replay_req;
    end
  end

  assign take     = stage2 ? replay_q : accept;
  assign take_bit = stage2 ? replay_bit : bit_in;

  // ---------------- stage A: window and position ----------------
  logic [N-1:0]    window;
  logic [MU_W-1:0] cnt_mu;
  logic [FR_W-1:0] cnt_frame;
  logic            cnt_last;
  logic            a_valid;
  logic [MU_W-1:0] a_mu;
  logic [FR_W-1:0] a_frame;

  sync_shift_reg #(.N(N)) u_sr (
    .clk(clk), .shift_en(take), .bit_in(take_bit), .window(window)
  );

  sync_counter #(.N(N), .M(M)) u_cnt (
    .clk(clk), .rst_n(rst_n), .clear(start || restart), .step(take && full),
    .mu(cnt_mu), .frame(cnt_frame), .last(cnt_last)
  );

  always_ff @(posedge clk) begin
    if (!rst_n || start || restart) begin
      fill_cnt <= '0;
      in_done  <= 1'b0;
      a_valid  <= 1'b0;
      a_mu     <= '0;
      a_frame  <= '0;
    end else begin
      a_valid <= take && full;
      if (take) begin
        if (!full) fill_cnt <= fill_cnt + 1'b1;
        else begin
          a_mu    <= cnt_mu;
          a_frame <= cnt_frame;
          if (cnt_last) in_done <= 1'b1;
        end
      end
    end
  end

  // ---------------- stage B: constraints, count, RAM read ----------------
  logic [NC-1:0]    active;      // constraints examined in this pass
  logic [NC-1:0]    unsat;
  logic [U_W-1:0]   u_count;
  logic             b_valid;
  logic [MU_W-1:0]  b_mu;
  logic [FR_W-1:0]  b_frame;
  logic [U_W-1:0]   b_u;
  logic [SUM_W-1:0] ram_rd;

  assign active = (is_list && !stage2) ? con_en_s1 : con_en;

  constraint_xor_bank #(.Z(Z)) u_xor (
    .window(window), .syndrome(syndrome), .con_en(active), .unsat(unsat)
  );

  multiop_adder #(.N_IN(NC)) u_add (.operands(unsat), .sum(u_count));

  always_ff @(posedge clk) begin
    if (!rst_n || start) begin
      b_valid <= 1'b0;
      b_mu    <= '0;
      b_frame <= '0;
      b_u     <= '0;
    end else begin
      b_valid <= a_valid;
      b_mu    <= a_mu;
      b_frame <= a_frame;
      b_u     <= u_count;
    end
  end

  // ---------------- stage C: accumulate, list or decide ----------------
  logic             b_final;     // this count belongs to frame M-1
  logic             b_total_ok;  // a complete M-frame total is present
  logic             b_last;      // ... and it is the one of offset N-1
  logic [SUM_W-1:0] total;
  logic             ram_we;
  logic             list_ins;
  logic             listed;
  logic             dec_valid;
  logic             dec_update;
  logic             dec_seen;
  logic             dec_hit;
  sync_method_e     dec_method;

  assign b_final    = (b_frame == FR_W'(M - 1));
  assign b_total_ok = b_valid && busy && b_final;
  assign b_last     = b_total_ok && (b_mu == MU_W'(N - 1));
  assign total      = SUM_W'(b_u) + ((b_frame == '0) ? '0 : ram_rd);
  assign ram_we     = b_valid && busy && !b_final;
  assign list_ins   = b_total_ok && is_list && !stage2;
  assign dec_valid  = b_total_ok && (!is_list || (stage2 && listed));
  assign dec_method = (method_q == METHOD_THRESHOLD) ? METHOD_THRESHOLD : METHOD_MAXIMUM;

  unsat_ram #(.DEPTH(N), .WIDTH(SUM_W)) u_ram (
    .clk(clk),
    .wr_en(ram_we), .wr_addr(b_mu), .wr_data(total),
    .rd_en(a_valid), .rd_addr(a_mu), .rd_data(ram_rd)
  );

  logic [MU_W-1:0]  cand_mu [GAMMA];
  logic [SUM_W-1:0] cand_u  [GAMMA];
  logic [GAMMA-1:0] cand_vld;

  candidate_list #(.GAMMA(GAMMA), .N(N), .SUM_W(SUM_W)) u_list (
    .clk(clk), .rst_n(rst_n), .clear(start),
    .valid(list_ins), .total(total), .mu(b_mu),
    .query_mu(b_mu), .match(listed),
    .cand_mu(cand_mu), .cand_u(cand_u), .cand_vld(cand_vld)
  );

  sync_decision #(.N(N), .SUM_W(SUM_W)) u_dec (
    .clk(clk), .rst_n(rst_n), .clear(start),
    .method(dec_method), .u_thresh(u_thresh_q),
    .valid(dec_valid), .total(total), .mu(b_mu),
    .min_u(min_u), .min_mu(mu_hat), .seen(dec_seen), .hit(dec_hit), .update(dec_update)
  );

  logic finish;
  assign finish = (b_last && (!is_list || stage2)) ||
                  (method_q == METHOD_THRESHOLD && dec_update);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      stage2     <= 1'b0;
      restart    <= 1'b0;
      method_q   <= METHOD_MAXIMUM;
      u_thresh_q <= '0;
    end else if (start) begin
      busy       <= 1'b1;
      done       <= 1'b0;
      stage2     <= 1'b0;
      restart    <= 1'b0;
      method_q   <= method;
      u_thresh_q <= u_thresh;
    end else begin
      done    <= finish;
      restart <= b_last && is_list && !stage2;
      if (restart) stage2 <= 1'b1;
      if (finish) busy <= 1'b0;
    end
  end

  assign found = (method_q == METHOD_THRESHOLD) ? dec_hit : dec_seen;

  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
  a_no_accept_idle: assert property (@(posedge clk) disable iff (!rst_n) !busy |-> !accept);
  a_list_full: assert property (@(posedge clk) disable iff (!rst_n)
                                (busy && is_list && stage2 && a_valid) |-> cand_vld[0]);

endmodule
