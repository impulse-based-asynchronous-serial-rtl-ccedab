// tb_toggle_ff: self-checking test of the receiver input toggle flip-flop.
// Applies pulses of random width and spacing and checks that the output
// flips once per pulse, on its rising edge, and that reset clears it.
module tb_toggle_ff;
  logic pulse_in = 0, rst = 0, q;
  logic exp_q;
  int checks = 0, failures = 0;

  toggle_ff dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst = 1;
    #2 rst = 0; exp_q = 0;
    #1 checks++; if (q !== 1'b0) failures++;
    for (int i = 0; i < 300; i++) begin
      #(1 + $urandom % 7);
      pulse_in = 1;
      exp_q = ~exp_q;
      #0.5;
      checks++; if (q !== exp_q) failures++;
      #(($urandom % 3) + 1) pulse_in = 0;
      #0.5;
      checks++; if (q !== exp_q) failures++;
      if (i == 150) begin
        rst = 1; #1 rst = 0; exp_q = 0;
        checks++; if (q !== 1'b0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
