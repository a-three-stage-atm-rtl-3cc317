// tb_rb_concentrator: offers the concentrator random sets of active
// packets, the k-th active one (in input order) addressed to output k, as
// the count generators do. Checks that output k carries the k-th packet's
// data exactly 2*log2(NP) clocks later, that other outputs are inactive, and
// that no collision is flagged; a new set enters every clock.
module tb_rb_concentrator;
  localparam int unsigned NP = 128, LG = 7, DW = 7;
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

  logic in_act [NP], out_act [NP], collision;
  logic [LG-1:0] in_dest [NP];
  logic [DW-1:0] in_data [NP], out_data [NP];
  rb_concentrator dut (.*);

  int exp_a [2100][NP];

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    for (int p = 0; p < NP; p++) begin in_act[p] = 0; in_dest[p] = '0; in_data[p] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000 + 2 * LG; t++) begin
      int n, dens;
      @(negedge clk);
      if (t >= 2 * LG) begin
        for (int p = 0; p < NP; p++) begin
          if (exp_a[t - 2 * LG][p] < 0) chk(!out_act[p], $sformatf("t%0d out %0d idle", t, p));
          else chk(out_act[p] && out_data[p] == DW'(exp_a[t - 2 * LG][p]), $sformatf("t%0d out %0d", t, p));
        end
        chk(!collision, "collision");
      end
      n = 0;
      dens = $urandom_range(1, 100);
      for (int p = 0; p < NP; p++) exp_a[t][p] = -1;
      for (int p = 0; p < NP; p++) begin
        in_act[p]  = (t < 2000) && ($urandom_range(1, 100) <= dens);
        in_dest[p] = in_act[p] ? LG'(n) : LG'($urandom);
        in_data[p] = DW'($urandom);
        if (in_act[p]) begin
          exp_a[t][n] = in_data[p];
          n++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
