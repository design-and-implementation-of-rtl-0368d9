// tb_sp_multiplier: checks the serial-parallel multiplier against the
// simulator's own multiplication for corner operands (most negative,
// most positive, zero, minus one) and random operands, and checks that
// done is seen XW+1 falling edges after start was set up (start sampled at
// one rising edge, XW shift steps, done visible after the XW-th).
module tb_sp_multiplier;
  localparam int AW = 16, XW = 17;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, done;
  logic signed [AW-1:0] a = '0;
  logic signed [XW-1:0] x = '0;
  logic signed [AW+XW-1:0] p;
  int checks = 0, failures = 0;

  sp_multiplier #(.AW(AW), .XW(XW)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input logic signed [AW-1:0] ta, input logic signed [XW-1:0] tx);
    int lat = 0;
    longint exp_p = longint'(ta) * longint'(tx);
    @(negedge clk); a = ta; x = tx; start = 1;
    @(negedge clk); start = 0; a = '1; x = '1;   // operands must have been captured
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks++;
    if (longint'(p) != exp_p) begin
      failures++; $display("%0d * %0d = %0d, expected %0d", ta, tx, p, exp_p);
    end
    checks++;
    if (lat != XW + 1) begin failures++; $display("latency %0d, expected %0d", lat, XW + 1); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    one(-32768, -65536); one(32767, 65535); one(-32768, 65535); one(32767, -65536);
    one(0, 12345); one(-1, -1); one(1, -65536); one(-32768, 1);
    for (int i = 0; i < 300; i++) one($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
