// tb_copy_network: offers the copy network the broadcast patterns that the
// routing packet generators produce: generator j on input j, interval
// starting at D_{j-1}+1 (D_j = sum of counts up to j, plus j) and holding
// between 0 and K0_j addresses. Checks that every output inside an
// interval receives exactly that packet's payload, every other output
// receives nothing, no collision is flagged, and the latency is 2*log2(NP)
// clocks with a new pattern accepted every clock. Also replays the
// broadcasts of the worked four-output-module example (counts 4, 7, 0, 1).
module tb_copy_network;
  localparam int unsigned NP = 128, LG = 7, PW = 8, L2 = 32, N1 = 96;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic          in_act [NP], out_act [NP], collision;
  logic [LG-1:0] in_lo [NP], in_hi [NP];
  logic [PW-1:0] in_pay [NP], out_pay [NP];
  copy_network dut (.clk, .rst_n, .in_act, .in_lo, .in_hi, .in_pay, .out_act, .out_pay, .collision);

  // expected output per pattern, queued by issue cycle
  int exp_a [2100][NP];
  int coll_seen = 0;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // pattern: counts k0[j]; this broadcast reaches the first kc[j] of them
  task automatic make(input int nj, input int k0 [L2], input int kc [L2], output int e [NP]);
    int base;
    base = 0;
    for (int p = 0; p < NP; p++) begin
      in_act[p] = 0; in_lo[p] = '0; in_hi[p] = '0; in_pay[p] = '0;
      e[p] = -1;
    end
    for (int j = 0; j < nj; j++) begin
      // cells for j sit at base .. base + k0[j] - 1; control packet at base + k0[j]
      if (kc[j] > 0) begin
        in_act[j] = 1;
        in_lo[j]  = LG'(base);
        in_hi[j]  = LG'(base + kc[j] - 1);
        in_pay[j] = PW'($urandom);
        for (int a = base; a < base + kc[j]; a++) e[a] = in_pay[j];
      end
      base += k0[j] + 1;
    end
  endtask

  int pending [$];
  initial begin
    int k0 [L2], kc [L2], e [NP], tot, cyc;
    for (int p = 0; p < NP; p++) begin in_act[p] = 0; in_lo[p] = '0; in_hi[p] = '0; in_pay[p] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000 + 2 * LG; t++) begin
      @(negedge clk);
      if (collision) coll_seen++;
      // compare outputs of the pattern issued 2*LG clocks ago
      if (t >= 2 * LG) begin
        int ex [NP];
        ex = exp_a[t - 2 * LG];
        for (int p = 0; p < NP; p++) begin
          if (ex[p] < 0) chk(!out_act[p], $sformatf("t%0d out %0d should be idle", t, p));
          else chk(out_act[p] && out_pay[p] == PW'(ex[p]), $sformatf("t%0d out %0d payload", t, p));
        end
      end
      if (t < 4) begin
        // worked example: four output modules, counts 4, 7, 0, 1
        int kk [4][4];
        kk = '{'{4, 7, 0, 1}, '{1, 4, 0, 0}, '{0, 3, 0, 0}, '{0, 1, 0, 0}};
        for (int j = 0; j < L2; j++) begin k0[j] = 0; kc[j] = 0; end
        k0[0] = 4; k0[1] = 7; k0[2] = 0; k0[3] = 1;
        for (int j = 0; j < 4; j++) kc[j] = kk[t][j];
        make(4, k0, kc, e);
      end else if (t < 2000) begin
        tot = 0;
        for (int j = 0; j < L2; j++) begin
          k0[j] = (tot < N1) ? $urandom_range(0, (t % 4 == 0) ? 12 : 5) : 0;
          if (tot + k0[j] > N1) k0[j] = N1 - tot;
          tot += k0[j];
          kc[j] = $urandom_range(0, k0[j]);
        end
        make(L2, k0, kc, e);
      end else begin
        for (int p = 0; p < NP; p++) begin in_act[p] = 0; e[p] = -1; end
      end
      exp_a[t] = e;
    end
    chk(coll_seen == 0, "no collision");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
