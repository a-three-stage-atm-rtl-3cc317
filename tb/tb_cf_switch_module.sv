// tb_cf_switch_module: random cells with group numbers, at most LINKS per
// group (as path allocation guarantees), into the default 128-input,
// 32 x 4-link module. Checks that link n of group g carries the n-th cell
// (in input order) bound for g one clock later, that unused links are empty
// and that overflow stays low; then overloads one group and checks that
// overflow rises and the first LINKS cells still get through.
module tb_cf_switch_module;
  localparam int unsigned NI = 128, G = 32, L = 4, GW = 5, W = 45;
  logic clk = 0, rst_n = 0, overflow;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic in_valid [NI];
  logic [GW-1:0] in_group [NI];
  logic [W-1:0] in_cell [NI];
  logic out_valid [G][L];
  logic [W-1:0] out_cell [G][L];
  cf_switch_module dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    int cnt [G], exp_p [G][L];
    for (int p = 0; p < NI; p++) begin in_valid[p] = 0; in_group[p] = '0; in_cell[p] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      bit hot;
      hot = (t % 10 == 9);
      @(negedge clk);
      for (int g = 0; g < G; g++) begin cnt[g] = 0; for (int n = 0; n < L; n++) exp_p[g][n] = -1; end
      for (int p = 0; p < NI; p++) begin
        int g;
        g = hot ? 3 : $urandom_range(0, G - 1);
        in_group[p] = GW'(g);
        in_cell[p]  = {W'($urandom), 16'(p)};
        in_valid[p] = ($urandom_range(0, 1) == 1) && (hot || cnt[g] < L);
        if (in_valid[p]) begin
          if (cnt[g] < L) exp_p[g][cnt[g]] = p;
          cnt[g]++;
        end
      end
      @(negedge clk);
      chk(overflow == (hot && cnt[3] > L), "overflow flag");
      for (int g = 0; g < G; g++)
        for (int n = 0; n < L; n++) begin
          if (exp_p[g][n] < 0) chk(!out_valid[g][n], "unused link empty");
          else chk(out_valid[g][n] && out_cell[g][n] == in_cell[exp_p[g][n]],
                   $sformatf("t%0d link %0d.%0d", t, g, n));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
