// tb_atm3_switch: end-to-end test of the switch, reduced to 192 ports
// (8 x 8 x 8 modules, 24 ports per module, S1 = 4, S2 = 8) so that it
// builds and runs in seconds.
//
// Each slot offers a cell on chosen input ports; the payload of every cell
// names its input module and port, so each delivered cell can be traced.
// A reference model in the testbench counts the requests K_ij and runs the
// path-allocation algorithm on explicit A / B / K tables, giving how many
// cells from input module i should cross intermediate module r to output
// module j. The testbench checks, per slot: those counts on the
// intermediate-to-output links, that every delivered cell is an offered
// one, delivered once, with its header intact and on a link of its own
// output module, the per-input-module loss counts, no error flag, and the
// slot length of 4*LG + MP + 7 clocks. Traffic: uniform full load, a hot
// spot that overloads one output module (cells must be lost), and a light
// load with idle ports. It counts how often cells were routed in a later
// iteration, lost, and left idle, and fails if one never happened.
module tb_atm3_switch;
  import atm_pkg::*;
  localparam int unsigned L1 = 8, L2 = 8, M = 8, N1 = 24, N2 = 24;
  localparam int unsigned S1 = 4, S2 = 8, PAYLOAD_W = PAYLOAD_W_DEF;
  localparam int unsigned JW = idx_w(L2), PTW = idx_w(N2);
  localparam int unsigned CELL_W = 1 + JW + PTW + PAYLOAD_W;
  localparam int unsigned NP = 1 << $clog2(N1 + L2);
  localparam int unsigned LG = $clog2(NP);
  localparam int unsigned MP = max3(L1, L2, M);
  localparam int unsigned LCW = $clog2(NP + 1);
  localparam int unsigned SLOT_CYCLES = 4 * LG + MP + 7;

  logic clk = 0, rst_n = 0, slot_start = 0, ready, slot_done, error;
  logic [CELL_W-1:0] in_cell  [L1][N1];
  logic              out_valid[M][L2][S2];
  logic [CELL_W-1:0] out_cell [M][L2][S2];
  logic [LCW-1:0]    lost_cnt [L1];

  atm3_switch #(.L1(L1), .L2(L2), .M(M), .N1(N1), .N2(N2), .S1(S1), .S2(S2),
                .PAYLOAD_W(PAYLOAD_W)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_late = 0, n_lost = 0, n_idle = 0, n_first = 0;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  int dest [L1][N1];           // -1: idle port
  int rk [MP][MP], ra [MP][MP], rb [MP][MP];
  int route [L1][M][L2];       // expected cells i -> r -> j
  int got   [L1][M][L2];
  bit seen  [L1][N1];

  task automatic model();
    for (int x = 0; x < MP; x++)
      for (int y = 0; y < MP; y++) begin
        rk[x][y] = 0;
        ra[x][y] = (x < L1 && y < M) ? S1 : 0;
        rb[x][y] = (x < M && y < L2) ? S2 : 0;
      end
    for (int i = 0; i < L1; i++)
      for (int p = 0; p < N1; p++)
        if (dest[i][p] >= 0) rk[i][dest[i][p]]++;
    for (int i = 0; i < L1; i++) for (int r = 0; r < M; r++) for (int j = 0; j < L2; j++) route[i][r][j] = 0;
    for (int it = 0; it < MP; it++)
      for (int i = 0; i < L1; i++)
        for (int j = 0; j < L2; j++) begin
          int r, x;
          r = ((i + j - it) % MP + MP) % MP;
          x = rk[i][j];
          if (ra[i][r] < x) x = ra[i][r];
          if (rb[r][j] < x) x = rb[r][j];
          rk[i][j] -= x; ra[i][r] -= x; rb[r][j] -= x;
          if (r < M) route[i][r][j] += x;
          if (it == 0) n_first += x; else n_late += x;
        end
  endtask

  task automatic run_slot(int mode);
    int t0, lost_exp;
    for (int i = 0; i < L1; i++)
      for (int p = 0; p < N1; p++) begin
        case (mode)
          0: dest[i][p] = $urandom_range(0, L2 - 1);                          // uniform full load
          1: dest[i][p] = ($urandom_range(0, 3) == 0) ? $urandom_range(0, L2 - 1) : 0;  // hot spot on module 0
          default: dest[i][p] = ($urandom_range(0, 2) == 0) ? $urandom_range(0, L2 - 1) : -1;
        endcase
        if (dest[i][p] < 0) begin
          n_idle++;
          in_cell[i][p] = CELL_W'($urandom);   // valid bit cleared below
          in_cell[i][p][CELL_W-1] = 1'b0;
        end else begin
          in_cell[i][p] = {1'b1, JW'(dest[i][p]), PTW'($urandom_range(0, N2 - 1)),
                           PAYLOAD_W'((i << 16) | p)};
        end
        seen[i][p] = 0;
      end
    model();
    @(negedge clk);
    chk(ready, "ready before slot");
    slot_start = 1;
    t0 = $time;
    @(negedge clk);
    slot_start = 0;
    while (!slot_done) @(negedge clk);
    chk(($time - t0) / 10 == SLOT_CYCLES, $sformatf("slot length %0d", ($time - t0) / 10));
    chk(!error, $sformatf("error flag rc%0d cp%0d im%0d mid%0d", |dut.coll_rc, |dut.coll_cp, |dut.ovf_im, |dut.ovf_mid));
    for (int i = 0; i < L1; i++) for (int r = 0; r < M; r++) for (int j = 0; j < L2; j++) got[i][r][j] = 0;
    for (int r = 0; r < M; r++)
      for (int j = 0; j < L2; j++)
        for (int n = 0; n < S2; n++)
          if (out_valid[r][j][n]) begin
            int i, p;
            i = int'(out_cell[r][j][n][PAYLOAD_W-1:16]);
            p = int'(out_cell[r][j][n][15:0]);
            chk(i < L1 && p < N1, "delivered cell names a real port");
            if (i < L1 && p < N1) begin
              chk(!seen[i][p], "cell delivered once");
              chk(out_cell[r][j][n] == in_cell[i][p], "cell intact");
              chk(dest[i][p] == j, "cell on its own output module");
              seen[i][p] = 1;
              got[i][r][j]++;
            end
          end
    for (int i = 0; i < L1; i++) begin
      lost_exp = 0;
      for (int j = 0; j < L2; j++) lost_exp += rk[i][j];
      n_lost += lost_exp;
      chk(lost_cnt[i] == LCW'(lost_exp), $sformatf("lost count im %0d: %0d vs %0d", i, lost_cnt[i], lost_exp));
      for (int r = 0; r < M; r++)
        for (int j = 0; j < L2; j++)
          chk(got[i][r][j] == route[i][r][j],
              $sformatf("route %0d->%0d->%0d: %0d vs %0d", i, r, j, got[i][r][j], route[i][r][j]));
    end
  endtask

  initial begin
    for (int i = 0; i < L1; i++) for (int p = 0; p < N1; p++) in_cell[i][p] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    run_slot(0);
    run_slot(1);
    run_slot(2);
    for (int t = 0; t < 20; t++) run_slot(t % 3);
    $display("count: routed in iteration 0 = %0d, in later iterations = %0d, lost = %0d, idle ports = %0d",
             n_first, n_late, n_lost, n_idle);
    chk(n_late > 0, "some cells routed after iteration 0");
    chk(n_lost > 0, "some cells lost contention");
    chk(n_idle > 0, "some ports idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
