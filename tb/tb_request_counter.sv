// tb_request_counter: builds the sorter output for random request counts
// (cells for output module j, then its control packet, idle cells above)
// and checks the counts K0_j, the control-packet positions D_j and the
// latency of 2*log2(NP)+1 = 15 clocks for 96 ports and 32 output modules.
// Includes all-idle, all-to-one-module and the worked example with counts
// 4, 7, 0, 1 for the first four modules.
module tb_request_counter;
  localparam int unsigned NP = 128, LG = 7, L2 = 32, JW = 5, CW = 7, N1 = 96;
  logic clk = 0, rst_n = 0, start = 0, done, collision;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [JW+1:0] sort_key [NP];
  logic [CW-1:0] k0 [L2];
  logic [LG-1:0] d [L2];
  request_counter dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    int kr [L2], pos, tot, lat;
    for (int p = 0; p < NP; p++) sort_key[p] = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      tot = 0;
      for (int j = 0; j < L2; j++) begin
        case (t)
          0: kr[j] = 0;
          1: kr[j] = (j == 5) ? N1 : 0;
          2: kr[j] = (j == 0) ? 4 : (j == 1) ? 7 : (j == 3) ? 1 : 0;
          default: kr[j] = $urandom_range(0, (t % 2) ? 6 : 3);
        endcase
        if (tot + kr[j] > N1) kr[j] = N1 - tot;
        tot += kr[j];
      end
      pos = 0;
      @(negedge clk);
      for (int j = 0; j < L2; j++) begin
        for (int c = 0; c < kr[j]; c++) sort_key[pos++] = {1'b0, JW'(j), 1'b0};
        sort_key[pos++] = {1'b0, JW'(j), 1'b1};
      end
      while (pos < NP) sort_key[pos++] = {1'b1, JW'($urandom), 1'($urandom)};
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done && lat < 100) begin @(negedge clk); lat++; end
      chk(lat == 2 * LG + 1, $sformatf("latency %0d", lat));
      chk(!collision, "collision");
      pos = -1;
      for (int j = 0; j < L2; j++) begin
        pos += kr[j] + 1;
        chk(k0[j] == CW'(kr[j]), $sformatf("t%0d K0[%0d] %0d vs %0d", t, j, k0[j], kr[j]));
        chk(d[j] == LG'(pos), $sformatf("t%0d D[%0d]", t, j));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
