// tb_batcher_sorter: feeds random keys (with many duplicates) into the
// default 128-record sorter and into a 100-record one (padded internally),
// and checks that the output is in ascending order and is a permutation of
// the input (each record carries its input index as data). Also checks the
// one-cycle latency and that the output holds while `load` is low.
module tb_batcher_sorter;
  localparam int unsigned KW = 7;
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

  localparam int unsigned NA = 128, NB = 100, DW = 45;
  logic load = 0;
  logic [KW-1:0] ka [NA], kao [NA];
  logic [DW-1:0] da [NA], dao [NA];
  logic [KW-1:0] kb [NB], kbo [NB];
  logic [7:0]    db [NB], dbo [NB];

  batcher_sorter dut_a (.clk, .rst_n, .load, .key_in(ka), .data_in(da), .key_out(kao), .data_out(dao));
  batcher_sorter #(.N(NB), .KW(KW), .DW(8)) dut_b (.clk, .rst_n, .load, .key_in(kb), .data_in(db), .key_out(kbo), .data_out(dbo));

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    int seen_a [NA];
    int seen_b [NB];
    for (int p = 0; p < NA; p++) begin ka[p] = '0; da[p] = '0; end
    for (int p = 0; p < NB; p++) begin kb[p] = '0; db[p] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int range;
      range = (t % 3 == 0) ? 7 : 127;
      @(negedge clk);
      for (int p = 0; p < NA; p++) begin ka[p] = KW'($urandom_range(0, range)); da[p] = DW'(p); end
      for (int p = 0; p < NB; p++) begin kb[p] = KW'($urandom_range(0, range)); db[p] = 8'(p); end
      load = 1;
      @(negedge clk);
      load = 0;
      // change the inputs: the registered output must not follow
      for (int p = 0; p < NA; p++) ka[p] = ~ka[p];
      @(negedge clk);
      for (int p = 0; p < NA; p++) seen_a[p] = 0;
      for (int p = 0; p < NB; p++) seen_b[p] = 0;
      for (int p = 0; p < NA; p++) begin
        if (p > 0) chk(kao[p-1] <= kao[p], "A order");
        chk(~ka[dao[p][6:0]] == kao[p], "A key travels with data");
        seen_a[dao[p][6:0]]++;
      end
      for (int p = 0; p < NB; p++) begin
        if (p > 0) chk(kbo[p-1] <= kbo[p], "B order");
        chk(dbo[p] < NB && kb[dbo[p]] == kbo[p], "B key travels with data");
        if (dbo[p] < NB) seen_b[dbo[p]]++;
      end
      for (int p = 0; p < NA; p++) chk(seen_a[p] == 1, "A permutation");
      for (int p = 0; p < NB; p++) chk(seen_b[p] == 1, "B permutation");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
