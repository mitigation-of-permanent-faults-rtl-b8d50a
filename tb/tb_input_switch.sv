// tb_input_switch - self-checking test of the FFE_2 input multiplexer:
// with direct low the output must follow the cascade input, with direct
// high the received sample.
`timescale 1ns/1ps
module tb_input_switch;
  logic [7:0] cascade_in, direct_in, out;
  logic direct;

  input_switch #(.W(8)) dut (.cascade_in(cascade_in), .direct_in(direct_in),
                             .direct(direct), .out(out));

  int checks = 0, failures = 0;

  initial begin
    for (int i = 0; i < 2000; i++) begin
      cascade_in = 8'($urandom);
      direct_in  = 8'($urandom);
      direct     = (i % 2 == 1);
      #1;
      checks++;
      if (out !== (direct ? direct_in : cascade_in)) begin
        failures++;
        $display("FAIL: direct=%0b out=%h", direct, out);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
