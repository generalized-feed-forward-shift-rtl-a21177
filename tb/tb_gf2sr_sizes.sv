// tb_gf2sr_sizes: state justification and identification on GF2SRs of 16,
// 32, 64 and 80 (64+16) stages, the register sizes for which the original
// work reports the run time of its software solver. Every size uses the
// rule-based functions of gf2sr_size_check; each scan-in and scan-out takes
// exactly K clocks.
module tb_gf2sr_sizes;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic done16, done32, done64, done80;
  int   c16, c32, c64, c80;
  int   f16, f32, f64, f80;

  gf2sr_size_check #(.K(16)) u16 (.clk, .done(done16), .checks(c16), .failures(f16));
  gf2sr_size_check #(.K(32)) u32 (.clk, .done(done32), .checks(c32), .failures(f32));
  gf2sr_size_check #(.K(64)) u64 (.clk, .done(done64), .checks(c64), .failures(f64));
  gf2sr_size_check #(.K(80)) u80 (.clk, .done(done80), .checks(c80), .failures(f80));

  int checks;
  int failures;

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c16 + c32 + c64 + c80,
             f16 + f32 + f64 + f80 + 1);
    $finish;
  end

  initial begin
    wait (done16 && done32 && done64 && done80);
    checks = c16 + c32 + c64 + c80;
    failures = f16 + f32 + f64 + f80;
    $display("sizes: K=16 %0d/%0d  K=32 %0d/%0d  K=64 %0d/%0d  K=80 %0d/%0d (checks/failures)",
             c16, f16, c32, f32, c64, f64, c80, f80);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
