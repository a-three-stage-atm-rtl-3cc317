// tb_tag_assigner: drives the routing-tag hardware of one input module
// with request counts and a non-increasing sequence of outstanding counts
// (one per broadcast, as the path-allocation array produces them) and
// checks the final tag of every cell: the cell at offset q among those for
// output module j keeps the token of the last broadcast b with q < K_b,
// i.e. intermediate module (i + j - b) mod MP, or none (lost) if that was
// the final null broadcast. Includes the worked example of four modules
// (counts 4, 7, 0, 1 falling to 1/4/0/0, 1/4/0/0, 0/3/0/0, 0/1/0/0). Checks
// that the tags have settled 2*log2(NP)+1 clocks after the last broadcast.
module tb_tag_assigner;
  localparam int unsigned NP = 128, LG = 7, L2 = 32, MP = 32, CW = 7, TW = 6, N1 = 96;
  logic clk = 0, rst_n = 0, clear = 0, bcast = 0, first = 0, nul = 0, collision;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [TW-1:0] im_idx;
  logic [CW-1:0] k [L2];
  logic [LG-1:0] d [L2];
  logic cell_valid [NP], tag_valid [NP], lost [NP];
  logic [TW-1:0] tag [NP];
  tag_assigner dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  int kseq [MP+1][L2];

  initial begin
    int tot, pos, i;
    for (int j = 0; j < L2; j++) begin k[j] = '0; d[j] = '0; end
    for (int p = 0; p < NP; p++) cell_valid[p] = 0;
    im_idx = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 150; t++) begin
      i = $urandom_range(0, MP - 1);
      tot = 0;
      for (int j = 0; j < L2; j++) begin
        kseq[0][j] = $urandom_range(0, 5);
        if (tot + kseq[0][j] > N1) kseq[0][j] = N1 - tot;
        tot += kseq[0][j];
        for (int b = 1; b <= MP; b++)
          kseq[b][j] = ($urandom_range(0, 3) == 0) ? $urandom_range(0, kseq[b-1][j]) : kseq[b-1][j];
      end
      if (t == 0) begin
        int ex [5][4];
        ex = '{'{4, 7, 0, 1}, '{1, 4, 0, 0}, '{1, 4, 0, 0}, '{0, 3, 0, 0}, '{0, 1, 0, 0}};
        i = 0;
        for (int b = 0; b <= MP; b++)
          for (int j = 0; j < L2; j++) kseq[b][j] = (j < 4) ? ex[(b < 4) ? b : 4][j] : 0;
      end
      // sorter layout and D_j
      pos = 0;
      for (int p = 0; p < NP; p++) cell_valid[p] = 0;
      for (int j = 0; j < L2; j++) begin
        for (int c = 0; c < kseq[0][j]; c++) cell_valid[pos++] = 1;
        d[j] = LG'(pos);
        pos++;
      end
      @(negedge clk);
      im_idx = TW'(i);
      clear = 1;
      @(negedge clk);
      clear = 0;
      for (int b = 0; b <= MP; b++) begin
        bcast = 1; first = (b == 0); nul = (b == MP);
        for (int j = 0; j < L2; j++) k[j] = CW'(kseq[b][j]);
        @(negedge clk);
      end
      bcast = 0; first = 0; nul = 0;
      repeat (2 * LG) @(negedge clk);
      // one clock early some tags may still be pending; now all are final
      @(negedge clk);
      chk(!collision, "collision");
      pos = 0;
      for (int j = 0; j < L2; j++) begin
        for (int q = 0; q < kseq[0][j]; q++) begin
          int last_b;
          last_b = -1;
          for (int b = 0; b <= MP; b++) if (q < kseq[b][j]) last_b = b;
          if (last_b == MP) chk(lost[pos] && !tag_valid[pos], $sformatf("t%0d cell %0d lost", t, pos));
          else chk(tag_valid[pos] && !lost[pos] && tag[pos] == TW'((i + j - last_b + MP) % MP),
                   $sformatf("t%0d cell %0d tag %0d", t, pos, tag[pos]));
          pos++;
        end
        chk(!tag_valid[pos] && !lost[pos], "control position has no tag");
        pos++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
