// tb_virtual_io: all six virtual-IO modes side by side, each driven by a
// vio_mode_harness with small word counts and FIFOs of 8 words so that the
// host side stalls. Passes when every word of every mode arrives where and
// in the order its mode prescribes.
module tb_virtual_io;
  import mpsoc_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  logic [6:1] fin;
  int c [6:1], f [6:1], s [6:1];

  always #5 clk = ~clk;

  vio_mode_harness #(.MODE(VIO_1)) h1 (.clk, .rst_n, .finished(fin[1]), .checks(c[1]), .failures(f[1]), .stalls(s[1]));
  vio_mode_harness #(.MODE(VIO_2)) h2 (.clk, .rst_n, .finished(fin[2]), .checks(c[2]), .failures(f[2]), .stalls(s[2]));
  vio_mode_harness #(.MODE(VIO_3)) h3 (.clk, .rst_n, .finished(fin[3]), .checks(c[3]), .failures(f[3]), .stalls(s[3]));
  vio_mode_harness #(.MODE(VIO_4)) h4 (.clk, .rst_n, .finished(fin[4]), .checks(c[4]), .failures(f[4]), .stalls(s[4]));
  vio_mode_harness #(.MODE(VIO_5)) h5 (.clk, .rst_n, .finished(fin[5]), .checks(c[5]), .failures(f[5]), .stalls(s[5]));
  vio_mode_harness #(.MODE(VIO_6)) h6 (.clk, .rst_n, .finished(fin[6]), .checks(c[6]), .failures(f[6]), .stalls(s[6]));

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    wait (&fin);
    for (int m = 1; m <= 6; m++) begin
      checks   += c[m] + 1;
      failures += f[m];
      if (s[m] == 0) begin failures++; $display("FAIL mode %0d: host side never stalled", m); end
      $display("mode %0d: checks=%0d failures=%0d host stalls=%0d", m, c[m], f[m], s[m]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
