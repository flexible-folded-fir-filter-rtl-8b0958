// tb_basic_cell: exhaustive test of the AND + full-adder cell. For all 16
// input combinations it checks s_out + 2*cy_out = s_in + cy_in + (x_bit & c_bit).
module tb_basic_cell;
  logic x_bit, c_bit, s_in, cy_in, s_out, cy_out;
  int checks = 0, failures = 0;

  basic_cell dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {x_bit, c_bit, s_in, cy_in} = 4'(v);
      #1;
      checks++;
      if (int'(s_out) + 2 * int'(cy_out) != int'(s_in) + int'(cy_in) + int'(x_bit & c_bit)) begin
        failures++;
        $display("FAIL inputs %b -> s=%b cy=%b", 4'(v), s_out, cy_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
