// atm3_switch: three-stage ATM switch fabric with cell-level path
// allocation (input and intermediate stages plus the path-allocation
// circuitry; the buffered output stage is outside this module).
//
// L1 input modules of N1 ports feed M intermediate modules over channel
// groups of S1 links; each intermediate module feeds every output module
// over a group of S2 links. In every time slot the path-allocation
// circuitry picks an intermediate module for each arriving cell such that
// no group is asked for more links than it has, so the first two stages
// never contend and never buffer. Per input module i:
//   * a Batcher sorter merges the N1 cells with one control packet per
//     output module (key {idle, output module, control});
//   * the request counter turns the positions of the control packets into
//     K0_ij, the number of cells for each output module j;
//   * the tag assigner broadcasts intermediate-module tokens to the sorted
//     cells as paths are found, and marks the cells left without one.
// One path-allocation array, shared by all input modules, runs the
// MP = max(L1, L2, M) iterations. Tagged cells then cross a contention-free
// input module (to the intermediate module named by the tag) and a
// contention-free intermediate module (to the requested output module).
// Cells that lose are discarded and counted.
//
// Interface and timing: a cell is {valid, output module, output port,
// payload}. When `ready` is high, a one-cycle `slot_start` samples
// in_cell. `slot_done` pulses 4*LG + MP + 7 clocks later (LG = log2 of the
// sorter size; 67 clocks at the defaults): out_valid / out_cell then hold
// the cells on each intermediate-to-output link (out_cell[r][j][n] is link
// n from intermediate module r to output module j), and lost_cnt the cells
// each input module discarded. They hold until the next slot_start.
// `error` flags a collision in a self-routing network or a link overflow,
// neither of which the algorithm allows. The algorithm, the sorter /
// counter / copy-network structure and the defaults follow the document;
// word-wide arithmetic, one iteration per clock and the sequencing are
// this design's choices.
module atm3_switch
  import atm_pkg::*;
#(
  parameter int unsigned L1        = L1_DEF,
  parameter int unsigned L2        = L2_DEF,
  parameter int unsigned M         = M_DEF,
  parameter int unsigned N1        = N1_DEF,
  parameter int unsigned N2        = N2_DEF,
  parameter int unsigned S1        = S1_DEF,
  parameter int unsigned S2        = S2_DEF,
  parameter int unsigned PAYLOAD_W = PAYLOAD_W_DEF,
  // derived
  parameter int unsigned JW     = idx_w(L2),
  parameter int unsigned PTW    = idx_w(N2),
  parameter int unsigned CELL_W = 1 + JW + PTW + PAYLOAD_W,
  parameter int unsigned NP     = 1 << $clog2(N1 + L2),
  parameter int unsigned LCW    = $clog2(NP + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              slot_start,
  output logic              ready,
  input  logic [CELL_W-1:0] in_cell  [L1][N1],
  output logic              slot_done,
  output logic              out_valid[M][L2][S2],
  output logic [CELL_W-1:0] out_cell [M][L2][S2],
  output logic [LCW-1:0]    lost_cnt [L1],
  output logic              error
);
  localparam int unsigned LG  = $clog2(NP);
  localparam int unsigned MP  = max3(L1, L2, M);
  localparam int unsigned CW  = $clog2(max3(N1, S1, S2) + 1);
  localparam int unsigned TW  = $clog2(MP + 1);
  localparam int unsigned RW  = idx_w(M);
  localparam int unsigned KW  = JW + 2;
  localparam int unsigned DRAIN = 2 * LG + 3;

  // ---------------------------------------------------------------- sequencer
  typedef enum logic [2:0] {IDLE, COUNT, ALLOC, DRAIN_S, DONE} state_t;
  state_t state;
  logic [$clog2(MP + DRAIN + 2)-1:0] cnt;
  logic sort_load, rc_start, rc_done, arr_load, arr_step, bcast, first, nul;

  assign ready     = (state == IDLE);
  assign sort_load = ready & slot_start;
  assign arr_load  = rc_done;
  assign bcast     = (state == ALLOC);
  assign first     = bcast & (cnt == '0);
  assign nul       = bcast & (cnt == $bits(cnt)'(MP));
  assign arr_step  = bcast & ~nul;
  assign slot_done = (state == DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      cnt      <= '0;
      rc_start <= 1'b0;
    end else begin
      rc_start <= sort_load;
      case (state)
        IDLE:    if (sort_load) state <= COUNT;
        COUNT:   if (rc_done) begin state <= ALLOC; cnt <= '0; end
        ALLOC:   if (nul) begin state <= DRAIN_S; cnt <= '0; end
                 else cnt <= cnt + 1'b1;
        DRAIN_S: if (cnt == $bits(cnt)'(DRAIN - 1)) state <= DONE;
                 else cnt <= cnt + 1'b1;
        default: state <= IDLE;
      endcase
    end
  end

  // ------------------------------------------------- per input module front end
  logic [CW-1:0] k0    [L1][L2];
  logic [CW-1:0] k_cur [L1][L2];
  logic [CW-1:0] r_cur [L1][L2];
  logic [L1-1:0] coll_rc, coll_cp, ovf_im;
  logic [L1-1:0] done_v;

  logic              t_valid [L1][NP];
  logic [TW-1:0]     t_tag   [L1][NP];
  logic [CELL_W-1:0] s_cell  [L1][NP];
  logic              lost    [L1][NP];

  for (genvar i = 0; i < L1; i++) begin : g_im
    logic [KW-1:0]     key_in  [NP];
    logic [CELL_W-1:0] cell_in [NP];
    logic [KW-1:0]     key_out [NP];
    logic [$clog2(NP)-1:0] d   [L2];
    logic              cvalid  [NP];

    for (genvar p = 0; p < NP; p++) begin : g_sin
      if (p < N1) begin : g_data
        // data cell: {idle, j, 0}
        assign key_in[p]  = {~in_cell[i][p][CELL_W-1], in_cell[i][p][CELL_W-2 -: JW], 1'b0};
        assign cell_in[p] = in_cell[i][p];
      end else if (p < N1 + L2) begin : g_ctrl
        // control packet for output module p - N1: {0, j, 1}
        assign key_in[p]  = {1'b0, JW'(p - N1), 1'b1};
        assign cell_in[p] = '0;
      end else begin : g_idle
        assign key_in[p]  = '1;
        assign cell_in[p] = '0;
      end
      assign cvalid[p] = ~key_out[p][KW-1] & ~key_out[p][0];
    end

    batcher_sorter #(.N(NP), .KW(KW), .DW(CELL_W)) u_sort (
      .clk, .rst_n, .load(sort_load),
      .key_in, .data_in(cell_in), .key_out, .data_out(s_cell[i])
    );

    request_counter #(.NP(NP), .L2(L2), .JW(JW), .CW(CW)) u_count (
      .clk, .rst_n, .start(rc_start), .sort_key(key_out),
      .done(done_v[i]), .k0(k0[i]), .d, .collision(coll_rc[i])
    );

    tag_assigner #(.NP(NP), .L2(L2), .MP(MP), .CW(CW), .TW(TW)) u_tag (
      .clk, .rst_n, .im_idx(TW'(i)), .clear(rc_start),
      .bcast, .first, .nul, .k(k_cur[i]), .d, .cell_valid(cvalid),
      .tag(t_tag[i]), .tag_valid(t_valid[i]), .lost(lost[i]),
      .collision(coll_cp[i])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) lost_cnt[i] <= '0;
      else if (state == DRAIN_S && cnt == $bits(cnt)'(DRAIN - 1)) begin
        logic [LCW-1:0] n;
        n = '0;
        for (int p = 0; p < NP; p++) n = n + LCW'(lost[i][p]);
        lost_cnt[i] <= n;
      end
    end
  end
  assign rc_done = done_v[0];

  path_alloc_array #(.L1(L1), .L2(L2), .M(M), .S1(S1), .S2(S2), .CW(CW)) u_array (
    .clk, .rst_n, .load(arr_load), .step(arr_step), .k0, .k(k_cur), .r(r_cur)
  );

  // ------------------------------------------------------ input stage modules
  logic              im_v [L1][M][S1];
  logic [CELL_W-1:0] im_c [L1][M][S1];

  for (genvar i = 0; i < L1; i++) begin : g_ism_in
    logic [RW-1:0] grp [NP];
    for (genvar p = 0; p < NP; p++) begin : g_g
      assign grp[p] = RW'(t_tag[i][p]);
    end
    cf_switch_module #(.NI(NP), .GROUPS(M), .LINKS(S1), .GW(RW), .W(CELL_W)) u_in_mod (
      .clk, .rst_n, .in_valid(t_valid[i]), .in_group(grp), .in_cell(s_cell[i]),
      .out_valid(im_v[i]), .out_cell(im_c[i]), .overflow(ovf_im[i])
    );
  end

  // ----------------------------------------------- intermediate stage modules
  logic [M-1:0] ovf_mid;
  for (genvar r = 0; r < M; r++) begin : g_mid
    logic              v   [L1*S1];
    logic [CELL_W-1:0] c   [L1*S1];
    logic [JW-1:0]     grp [L1*S1];
    for (genvar i = 0; i < L1; i++) begin : g_i
      for (genvar s = 0; s < S1; s++) begin : g_s
        assign v[i*S1+s]   = im_v[i][r][s];
        assign c[i*S1+s]   = im_c[i][r][s];
        assign grp[i*S1+s] = im_c[i][r][s][CELL_W-2 -: JW];
      end
    end
    cf_switch_module #(.NI(L1*S1), .GROUPS(L2), .LINKS(S2), .GW(JW), .W(CELL_W)) u_mid_mod (
      .clk, .rst_n, .in_valid(v), .in_group(grp), .in_cell(c),
      .out_valid(out_valid[r]), .out_cell(out_cell[r]), .overflow(ovf_mid[r])
    );
  end

  // ------------------------------------------------------------------ errors
  logic error_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) error_q <= 1'b0;
    else if (sort_load) error_q <= 1'b0;
    // the self-routing networks must never collide; the link-overflow
    // flags only count once the tags are final (slot_done cycle)
    else if ((|coll_rc) || (|coll_cp) || (slot_done && ((|ovf_im) || (|ovf_mid)))) error_q <= 1'b1;
  end
  assign error = error_q | (slot_done & ((|ovf_im) | (|ovf_mid)));
endmodule
