// tb_tmr_voter - self-checking test of the 2-of-3 majority voter: random
// words with one copy corrupted, or all three random, compared with a
// bit-by-bit vote counted in the testbench.
`timescale 1ns/1ps
module tb_tmr_voter;
  localparam int W = 16;
  logic [W-1:0] a, b, c, y;

  tmr_voter #(.W(W)) dut (.a(a), .b(b), .c(c), .y(y));

  int checks = 0, failures = 0;

  initial begin
    for (int i = 0; i < 5000; i++) begin
      logic [W-1:0] good, expv;
      good = W'($urandom);
      a = good; b = good; c = good;
      case (i % 4)
        0: a = W'($urandom);
        1: b = W'($urandom);
        2: c = W'($urandom);
        default: begin a = W'($urandom); b = W'($urandom); c = W'($urandom); end
      endcase
      for (int k = 0; k < W; k++) begin
        int ones;
        ones = int'(a[k]) + int'(b[k]) + int'(c[k]);
        expv[k] = (ones >= 2);
      end
      #1;
      checks++;
      if (y !== expv) begin failures++; $display("FAIL %h %h %h -> %h", a, b, c, y); end
      if (i % 4 != 3) begin
        checks++;
        if (y !== good) begin failures++; $display("FAIL single fault not masked"); end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
