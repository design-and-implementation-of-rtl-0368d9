// tb_mod_table: writes both tables and the length register, then reads
// them back through both read ports; also checks that a length of 0 or
// above DEPTH is taken as DEPTH and that the length resets to 1.
module tb_mod_table;
  import lpeq_pkg::*;
  localparam int DEPTH = 64, AW = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [1:0] wsel = '0;
  logic [AW-1:0] waddr = '0, ra_idx = '0, rb_idx = '0;
  tab_t wdata = '0, ra_cos, ra_sin, rb_cos, rb_sin;
  logic [AW:0] len;
  int checks = 0, failures = 0;
  tab_t c [DEPTH], s [DEPTH];

  mod_table #(.DEPTH(DEPTH)) dut (.*);

  task automatic wr(input logic [1:0] sel, input int a, input int d);
    @(negedge clk); we = 1; wsel = sel; waddr = AW'(a); wdata = tab_t'(d);
    @(negedge clk); we = 0;
  endtask
  task automatic chk(input logic cond, input string what);
    checks++; if (!cond) begin failures++; $display("fail: %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); chk(len == 1, "reset length");
    for (int i = 0; i < DEPTH; i++) begin
      c[i] = tab_t'($urandom); s[i] = tab_t'($urandom);
      wr(0, i, c[i]); wr(1, i, s[i]);
    end
    wr(2, 0, 40); @(negedge clk); chk(len == 40, "length 40");
    wr(2, 0, 0);  @(negedge clk); chk(len == DEPTH, "length 0 -> DEPTH");
    wr(2, 0, 99); @(negedge clk); chk(len == DEPTH, "length 99 -> DEPTH");
    for (int i = 0; i < 200; i++) begin
      ra_idx = AW'($urandom); rb_idx = AW'($urandom); #1;
      chk(ra_cos == c[ra_idx] && ra_sin == s[ra_idx], "port a");
      chk(rb_cos == c[rb_idx] && rb_sin == s[rb_idx], "port b");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
