// tb_path_alloc_array: runs the path-allocation array for random request
// patterns and compares the outstanding-request counts after every
// iteration with a reference model of the algorithm kept in the testbench
// (explicit A[i][r], B[r][j] and K[i][j] tables). Two shapes are run side by
// side: the default 32 x 32 x 32 array and the 2 x 4 x 3 shape of Fig. 2(b)
// (L1 = 2 input, M = 4 intermediate, L2 = 3 output modules). It also checks
// that the array needs exactly MP iterations, and that no A or B limit is
// ever exceeded in the reference totals.
module tb_path_alloc_array;
  localparam int unsigned CW = 7;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- default-size array
  localparam int unsigned AL1 = 32, AL2 = 32, AM = 32, AS1 = 4, AS2 = 8;
  logic load_a = 0, step_a = 0;
  logic [CW-1:0] k0_a [AL1][AL2];
  logic [CW-1:0] k_a  [AL1][AL2];
  logic [CW-1:0] r_a  [AL1][AL2];
  path_alloc_array dut_a (.clk, .rst_n, .load(load_a), .step(step_a), .k0(k0_a), .k(k_a), .r(r_a));

  // ---- Fig. 2(b) shape
  localparam int unsigned BL1 = 2, BL2 = 3, BM = 4, BS1 = 3, BS2 = 2;
  logic load_b = 0, step_b = 0;
  logic [CW-1:0] k0_b [BL1][BL2];
  logic [CW-1:0] k_b  [BL1][BL2];
  logic [CW-1:0] r_b  [BL1][BL2];
  path_alloc_array #(.L1(BL1), .L2(BL2), .M(BM), .S1(BS1), .S2(BS2), .CW(CW))
    dut_b (.clk, .rst_n, .load(load_b), .step(step_b), .k0(k0_b), .k(k_b), .r(r_b));

  int rk [32][32];
  int ra [32][32];
  int rb [32][32];

  task automatic model_init(int l1, int l2, int m, int s1, int s2, int mp);
    for (int x = 0; x < mp; x++)
      for (int y = 0; y < mp; y++) begin
        ra[x][y] = (x < l1 && y < m) ? s1 : 0;   // A[i][r]
        rb[x][y] = (x < m && y < l2) ? s2 : 0;   // B[r][j]
      end
  endtask

  task automatic model_iter(int l1, int l2, int mp, int it);
    for (int i = 0; i < l1; i++)
      for (int j = 0; j < l2; j++) begin
        int rr, x;
        rr = ((i + j - it) % mp + mp) % mp;
        x = rk[i][j];
        if (ra[i][rr] < x) x = ra[i][rr];
        if (rb[rr][j] < x) x = rb[rr][j];
        rk[i][j] -= x; ra[i][rr] -= x; rb[rr][j] -= x;
      end
  endtask

  task automatic run_a(int maxk);
    for (int i = 0; i < AL1; i++)
      for (int j = 0; j < AL2; j++) begin
        k0_a[i][j] = CW'($urandom_range(0, maxk));
        rk[i][j] = k0_a[i][j];
      end
    model_init(AL1, AL2, AM, AS1, AS2, 32);
    @(negedge clk); load_a = 1; @(negedge clk); load_a = 0;
    for (int it = 0; it < 32; it++) begin
      step_a = 1; @(negedge clk); step_a = 0;
      model_iter(AL1, AL2, 32, it);
      for (int i = 0; i < AL1; i++)
        for (int j = 0; j < AL2; j++) begin
          checks++;
          if (k_a[i][j] != CW'(rk[i][j])) begin
            failures++;
            if (failures < 10) $display("FAIL A it %0d K[%0d][%0d] got %0d exp %0d", it, i, j, k_a[i][j], rk[i][j]);
          end
        end
    end
    // no link group is used beyond its size
    for (int x = 0; x < 32; x++)
      for (int y = 0; y < 32; y++) begin
        checks++;
        if (ra[x][y] < 0 || rb[x][y] < 0) failures++;
      end
  endtask

  task automatic run_b(int maxk);
    for (int i = 0; i < BL1; i++)
      for (int j = 0; j < BL2; j++) begin
        k0_b[i][j] = CW'($urandom_range(0, maxk));
        rk[i][j] = k0_b[i][j];
      end
    model_init(BL1, BL2, BM, BS1, BS2, 4);
    @(negedge clk); load_b = 1; @(negedge clk); load_b = 0;
    for (int it = 0; it < 4; it++) begin
      step_b = 1; @(negedge clk); step_b = 0;
      model_iter(BL1, BL2, 4, it);
      for (int i = 0; i < BL1; i++)
        for (int j = 0; j < BL2; j++) begin
          checks++;
          if (k_b[i][j] != CW'(rk[i][j])) begin
            failures++;
            if (failures < 10) $display("FAIL B it %0d K[%0d][%0d] got %0d exp %0d", it, i, j, k_b[i][j], rk[i][j]);
          end
        end
    end
  endtask

  initial begin
    for (int i = 0; i < AL1; i++) for (int j = 0; j < AL2; j++) k0_a[i][j] = '0;
    for (int i = 0; i < BL1; i++) for (int j = 0; j < BL2; j++) k0_b[i][j] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) run_a(t < 3 ? 6 : 12);
    for (int t = 0; t < 200; t++) run_b(t % 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
