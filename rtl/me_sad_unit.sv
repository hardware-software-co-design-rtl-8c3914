// me_sad_unit: SAD arithmetic unit with early termination.
//
// Evaluates one candidate motion vector: it sums |cur - ref| over the
// pixels of the current macroblock, or of one of its sub-blocks (variable
// block size, selected by w_m1/h_m1/off_x/off_y as in me_agu), and the
// candidate block of the search area, one pixel per cycle, and keeps the
// best candidate seen since the last `clr_best`. The running sum is
// compared with the best SAD after every pixel: as soon as it reaches the
// best SAD the candidate can no longer win and the evaluation stops (early
// termination). A candidate that completes is therefore strictly better
// and replaces the best (ties keep the earlier candidate). A candidate
// outside the search area is skipped.
//
// Interface: `start` (while idle) with `cand_x`, `cand_y` begins an
// evaluation; `done` pulses for one cycle at its end together with
// `better`, `early` (stopped before its last pixel) or `skipped`, and `sad`
// (the complete or partial sum). The memories are read through
// word-addressed synchronous ports (one cycle latency, 4 pixels per 32-bit
// word, pixel at byte address a in bits [8*(a%4) +: 8]).
// Timing: a complete candidate of W x H pixels raises `done` W*H + 2 cycles
// after the `start` cycle; one stopped after pixel k (0-based) raises it k + 3
// cycles after; a skipped one 2 cycles after.
// The unit and its early termination follow the published description; the
// one-pixel-per-cycle datapath and the per-pixel comparison are this
// design's own choice.
module me_sad_unit #(
  parameter int unsigned MB_SIZE      = 16,
  parameter int unsigned SEARCH_RANGE = 32,
  localparam int unsigned SA_W   = MB_SIZE + SEARCH_RANGE,
  localparam int unsigned MB_AW  = $clog2(MB_SIZE * MB_SIZE),
  localparam int unsigned SA_AW  = $clog2(SA_W * SA_W),
  localparam int unsigned SAD_W  = $clog2(MB_SIZE * MB_SIZE * 255 + 1),
  localparam int unsigned IDX_W  = $clog2(MB_SIZE)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic signed [15:0]  cand_x,
  input  logic signed [15:0]  cand_y,
  input  logic [IDX_W-1:0]    w_m1,
  input  logic [IDX_W-1:0]    h_m1,
  input  logic [IDX_W-1:0]    off_x,
  input  logic [IDX_W-1:0]    off_y,
  input  logic                clr_best,
  output logic [MB_AW-3:0]    mb_raddr,
  input  logic [31:0]         mb_rdata,
  output logic [SA_AW-3:0]    sa_raddr,
  input  logic [31:0]         sa_rdata,
  output logic                busy,
  output logic                done,
  output logic                better,
  output logic                early,
  output logic                skipped,
  output logic [SAD_W-1:0]    sad,
  output logic signed [15:0]  best_x,
  output logic signed [15:0]  best_y,
  output logic [SAD_W-1:0]    best_sad
);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_DRAIN} state_e;
  state_e state;

  logic [MB_AW-1:0] mb_addr;
  logic [SA_AW-1:0] sa_addr;
  logic             agu_last, in_range, issue;

  assign issue = (state == S_ISSUE) && in_range;

  me_agu #(.MB_SIZE(MB_SIZE), .SEARCH_RANGE(SEARCH_RANGE)) u_agu (
    .clk, .rst_n,
    .start   (start && state == S_IDLE),
    .cand_x, .cand_y, .w_m1, .h_m1, .off_x, .off_y,
    .advance (issue),
    .mb_addr, .sa_addr,
    .last    (agu_last),
    .in_range
  );

  assign mb_raddr = mb_addr[MB_AW-1:2];
  assign sa_raddr = sa_addr[SA_AW-1:2];

  // Second stage: the words arrive, select the pixels and accumulate.
  logic             v1, last1;
  logic [1:0]       mb_lane, sa_lane;
  logic [SAD_W-1:0] acc;
  logic signed [15:0] cx, cy;
  logic [7:0]       pcur, pref, ad;
  logic [SAD_W-1:0] acc_next;

  always_comb begin
    pcur     = mb_rdata[8*mb_lane +: 8];
    pref     = sa_rdata[8*sa_lane +: 8];
    ad       = (pcur > pref) ? pcur - pref : pref - pcur;
    acc_next = acc + SAD_W'(ad);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      v1       <= 1'b0;
      last1    <= 1'b0;
      mb_lane  <= '0;
      sa_lane  <= '0;
      acc      <= '0;
      cx       <= '0;
      cy       <= '0;
      done     <= 1'b0;
      better   <= 1'b0;
      early    <= 1'b0;
      skipped  <= 1'b0;
      sad      <= '0;
      best_x   <= '0;
      best_y   <= '0;
      best_sad <= '1;
    end else begin
      done    <= 1'b0;
      better  <= 1'b0;
      early   <= 1'b0;
      skipped <= 1'b0;
      if (state == S_IDLE) begin
        v1 <= 1'b0;
        if (clr_best) begin
          best_sad <= '1;
          best_x   <= '0;
          best_y   <= '0;
        end
        if (start) begin
          state <= S_ISSUE;
          acc   <= '0;
          cx    <= cand_x;
          cy    <= cand_y;
        end
      end else if (state == S_ISSUE && !in_range) begin
        done    <= 1'b1;
        skipped <= 1'b1;
        state   <= S_IDLE;
      end else begin
        v1      <= issue;
        last1   <= agu_last;
        mb_lane <= mb_addr[1:0];
        sa_lane <= sa_addr[1:0];
        if (issue && agu_last) state <= S_DRAIN;
        if (v1) begin
          if (acc_next >= best_sad) begin
            // Can no longer beat the best candidate: stop here.
            done  <= 1'b1;
            early <= !last1;
            sad   <= acc_next;
            state <= S_IDLE;
            v1    <= 1'b0;
          end else if (last1) begin
            done     <= 1'b1;
            better   <= 1'b1;
            sad      <= acc_next;
            best_sad <= acc_next;
            best_x   <= cx;
            best_y   <= cy;
            state    <= S_IDLE;
            v1       <= 1'b0;
          end else begin
            acc <= acc_next;
          end
        end
      end
    end
  end

  assign busy = (state != S_IDLE);

  // A new candidate may only be started while the unit is idle.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> state == S_IDLE);

endmodule
