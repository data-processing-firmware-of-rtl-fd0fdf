// tb_salt_decoder: checks the SALT packet decoder at the three stream widths
// (3, 4 and 5 e-links) with random packets of all kinds.
module tb_salt_decoder;
  logic clk = 0, rst_n = 1;
  initial begin rst_n = 0; end  // a real edge at time 0, so the asynchronous resets act at once
  always #2 clk = ~clk;
  int c[3], f[3];
  logic d[3];

  salt_decoder_check #(.W(24)) u24 (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .done(d[0]));
  salt_decoder_check #(.W(32)) u32 (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .done(d[1]));
  salt_decoder_check #(.W(40)) u40 (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .done(d[2]));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d[0] && d[1] && d[2]);
    $display("TB_RESULT checks=%0d failures=%0d", c[0]+c[1]+c[2], f[0]+f[1]+f[2]);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0]+c[1]+c[2], f[0]+f[1]+f[2]+1);
    $finish;
  end
endmodule
