// tb_final_adder: streams random operand pairs (with random gaps) into the
// pipelined adder and checks that every result a + b mod 2^27 comes out
// exactly 27 cycles later, in order, and that clr drops results in flight.
module tb_final_adder;
  localparam int YW = 27;
  logic clk = 0, rst_n = 0, clr = 0, valid_i = 0, valid_o;
  logic [YW-1:0] a = '0, b = '0, sum_o;
  int checks = 0, failures = 0;
  longint cycle = 0;
  logic [YW-1:0] exp_q [$];
  longint        t_q [$];

  final_adder #(.YW(YW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (valid_o) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        logic [YW-1:0] e;
        longint t;
        e = exp_q.pop_front();
        t = t_q.pop_front();
        if (sum_o !== e || cycle - t != YW) begin
          failures++; $display("FAIL sum %h want %h, after %0d cycles", sum_o, e, cycle - t);
        end
      end
    end
    if (clr) begin exp_q.delete(); t_q.delete(); end
    else if (valid_i) begin exp_q.push_back(a + b); t_q.push_back(cycle); end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      valid_i = $urandom_range(0, 2) != 0;
      a = YW'($urandom); b = YW'($urandom);
      if (it % 8 == 0) begin a = '1; b = YW'(1); end   // full carry ripple
      clr = (it == 1000);
    end
    @(negedge clk); valid_i = 0; clr = 0;
    repeat (YW + 5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
