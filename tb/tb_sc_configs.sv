// tb_sc_configs: the evaluated variants of the symbolic cache, each run on the
// same kind of random program and checked against the reference model:
//   P-color width 0, 2 and 4 bits (word alignment, randomized index),
//   the 2-bit design without index randomization,
//   the 2-bit design with byte alignment instead of word alignment,
//   a fully associative SC (one set of 64 ways),
//   half-word and doubleword alignment units.
// All are 4 KB with 64-byte lines; all but the fully associative one are
// 4-way. The accuracy each reaches on this synthetic program is printed for
// information only.
module tb_sc_configs;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int N = 8;
  logic done [N];
  int   c [N], f [N], ld [N], ok [N];
  string names [N] = '{"word pcolor0", "word pcolor2", "word pcolor4", "word pcolor2 plain-index", "byte pcolor2", "word pcolor2 fully-assoc", "half-word pcolor2", "doubleword pcolor2"};

  sc_cfg_run #(.PCOLOR_BITS(0), .UNIT_BYTES(4), .RANDOMIZE(1)) r0 (.clk, .done(done[0]), .checks(c[0]), .failures(f[0]), .n_loads(ld[0]), .n_correct(ok[0]));
  sc_cfg_run #(.PCOLOR_BITS(2), .UNIT_BYTES(4), .RANDOMIZE(1)) r1 (.clk, .done(done[1]), .checks(c[1]), .failures(f[1]), .n_loads(ld[1]), .n_correct(ok[1]));
  sc_cfg_run #(.PCOLOR_BITS(4), .UNIT_BYTES(4), .RANDOMIZE(1)) r2 (.clk, .done(done[2]), .checks(c[2]), .failures(f[2]), .n_loads(ld[2]), .n_correct(ok[2]));
  sc_cfg_run #(.PCOLOR_BITS(2), .UNIT_BYTES(4), .RANDOMIZE(0)) r3 (.clk, .done(done[3]), .checks(c[3]), .failures(f[3]), .n_loads(ld[3]), .n_correct(ok[3]));
  sc_cfg_run #(.PCOLOR_BITS(2), .UNIT_BYTES(1), .RANDOMIZE(1)) r4 (.clk, .done(done[4]), .checks(c[4]), .failures(f[4]), .n_loads(ld[4]), .n_correct(ok[4]));

  sc_cfg_run #(.PCOLOR_BITS(2), .UNIT_BYTES(4), .RANDOMIZE(1), .WAYS(64), .SETS(1)) r5 (.clk, .done(done[5]), .checks(c[5]), .failures(f[5]), .n_loads(ld[5]), .n_correct(ok[5]));
  sc_cfg_run #(.PCOLOR_BITS(2), .UNIT_BYTES(2), .RANDOMIZE(1)) r6 (.clk, .done(done[6]), .checks(c[6]), .failures(f[6]), .n_loads(ld[6]), .n_correct(ok[6]));
  sc_cfg_run #(.PCOLOR_BITS(2), .UNIT_BYTES(8), .RANDOMIZE(1)) r7 (.clk, .done(done[7]), .checks(c[7]), .failures(f[7]), .n_loads(ld[7]), .n_correct(ok[7]));

  int checks, failures;

  function automatic void total();
    checks = 0; failures = 0;
    for (int i = 0; i < N; i++) begin checks += c[i]; failures += f[i]; end
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    total();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    do begin
      @(posedge clk);
      all = 1;
      for (int i = 0; i < N; i++) all &= done[i];
    end while (!all);
    for (int i = 0; i < N; i++)
      $display("%-26s loads=%0d correct=%0d checks=%0d failures=%0d", names[i], ld[i], ok[i], c[i], f[i]);
    total();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
