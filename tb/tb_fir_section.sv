// tb_fir_section: random test of one section at the default widths. Each
// cycle it drives random operands and flags and checks, one clock later, that
// the carry-save result equals the previous result (or zero on start) plus
// coefficient bit * data word modulo 2^27, that the data word leaves doubled,
// that valid/done follow start/valid/last, that en = 0 holds the registers
// and that clr clears the flags.
module tb_fir_section;
  localparam int XW = 8, YW = 27;
  logic clk = 0, rst_n = 0;
  logic en, clr, start, load, last, coef_bit, valid_i;
  logic [XW-1:0] x_load;
  logic [YW-1:0] x_i, s_i, c_i, x_o, s_o, c_o;
  logic valid_o, done_o;
  int checks = 0, failures = 0;

  fir_section #(.XW(XW), .YW(YW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [YW-1:0] ex_x, ex_sum, xu, px, ps, pc;
    logic ex_v, ex_d, pv, pd;
    {en, clr, start, load, last, coef_bit, valid_i} = '0;
    x_load = '0; x_i = '0; s_i = '0; c_i = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      en = ($urandom_range(0, 7) != 0);
      clr = ($urandom_range(0, 31) == 0);
      start = $urandom_range(0, 1); load = $urandom_range(0, 1);
      last = ($urandom_range(0, 3) == 0); coef_bit = $urandom_range(0, 1);
      valid_i = $urandom_range(0, 1);
      x_load = XW'($urandom); x_i = YW'($urandom); s_i = YW'($urandom); c_i = YW'($urandom);
      px = x_o; ps = s_o; pc = c_o; pv = valid_o; pd = done_o;
      xu = load ? YW'(x_load) : x_i;
      ex_x = xu << 1;
      ex_sum = (start ? YW'(0) : s_i + c_i) + (coef_bit ? xu : YW'(0));
      ex_v = (start | valid_i) & ~last;
      ex_d = (start | valid_i) & last;
      @(posedge clk); #1;
      checks++;
      if (clr) begin
        if (valid_o || done_o || x_o !== px) begin failures++; $display("FAIL clr"); end
      end else if (!en) begin
        if (x_o !== px || s_o !== ps || c_o !== pc || valid_o !== pv || done_o !== pd) begin
          failures++; $display("FAIL hold");
        end
      end else begin
        if (x_o !== ex_x || YW'(s_o + c_o) !== ex_sum || valid_o !== ex_v || done_o !== ex_d) begin
          failures++;
          $display("FAIL it=%0d x %h/%h sum %h/%h v %b/%b d %b/%b", it, x_o, ex_x, YW'(s_o + c_o), ex_sum,
                   valid_o, ex_v, done_o, ex_d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
