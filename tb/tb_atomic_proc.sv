// tb_atomic_proc: drives one atomic() processor with random K, A and B
// and checks R, the reduced K and the values forwarded to the neighbours
// against min() and subtraction worked out in the testbench.
module tb_atomic_proc;
  localparam int unsigned CW = 7;
  logic clk = 0, rst_n = 0, load = 0, step = 0;
  logic [CW-1:0] k_init, a_init, b_init, a_in, b_in, a_out, b_out, k, r;
  int checks = 0, failures = 0;

  atomic_proc #(.CW(CW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned min3(int unsigned x, int unsigned y, int unsigned z);
    int unsigned t;
    t = (x < y) ? x : y;
    return (t < z) ? t : z;
  endfunction

  task automatic check(string what, int unsigned got, int unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int unsigned ek, ea, eb, er;
    k_init = 0; a_init = 0; b_init = 0; a_in = 0; b_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      load = 1;
      k_init = CW'($urandom_range(0, 96));
      a_init = CW'($urandom_range(0, 8));
      b_init = CW'($urandom_range(0, 8));
      ek = k_init; ea = a_init; eb = b_init;
      @(negedge clk);
      load = 0;
      for (int it = 0; it < 3; it++) begin
        er = min3(ek, ea, eb);
        check("r", r, er);
        check("k", k, ek);
        check("a_out", a_out, ea - er);
        check("b_out", b_out, eb - er);
        // one iteration: new A and B arrive from the neighbours
        step = 1;
        a_in = CW'($urandom_range(0, 8));
        b_in = CW'($urandom_range(0, 8));
        @(negedge clk);
        step = 0;
        ek = ek - er; ea = a_in; eb = b_in;
      end
      check("k after", k, ek);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
