// tb_me_wrapper: self-checking test of the motion-estimation wrapper.  It
// runs two complete set-ups side by side (me_wrapper_bench): little-endian
// memory with burst SDRAM replies, and big-endian memory with the SDRAM
// model in single data mode, so that the loader gets every word as a
// separate, irregularly timed HIBI transfer.  Each set-up checks two full
// motion-estimation operations (SAD, motion vector, 64 best-match words),
// the run-time image width change, the SDRAM port retry and the
// self-release, and that an operation's input phase takes at least 640
// cycles (160 accelerator words of four bus words each).  The checks of
// both are added up.
// The test cases follow the original design's wrapper verification (single
// data mode, endianness, SDRAM protocol, self-release); the numbers are this
// bench's own.
module tb_me_wrapper;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int c0, f0, c1, f1, checks, failures;
  logic d0, d1;
  me_wrapper_bench #(.BIG_ENDIAN(1'b0), .SINGLE(1'b0)) u_le_burst (
    .clk, .rst_n, .checks(c0), .failures(f0), .done(d0));
  me_wrapper_bench #(.BIG_ENDIAN(1'b1), .SINGLE(1'b1)) u_be_single (
    .clk, .rst_n, .checks(c1), .failures(f1), .done(d1));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    while (!(d0 && d1)) @(posedge clk);
    checks = c0 + c1;
    failures = f0 + f1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    checks = c0 + c1;
    failures = f0 + f1 + 1;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
