// tb_slicer - self-checking test of the slicer.
//
// Random block outputs, configurations, training flags and training symbols;
// the expected sum, decision and error (y - reference level, with levels
// +/-16384) are computed in integer arithmetic in the testbench.
`timescale 1ns/1ps
module tb_slicer;
  import ffe_pkg::*;

  logic signed [YB_W-1:0] y1, y2;
  ffe_cfg_e cfg;
  logic training, t_sym, d_sym;
  logic signed [YB_W:0] y;
  logic signed [E_W-1:0] e;

  slicer dut (.y1(y1), .y2(y2), .cfg(cfg), .training(training), .t_sym(t_sym),
              .y(y), .d_sym(d_sym), .e(e));

  int checks = 0, failures = 0;

  initial begin
    for (int i = 0; i < 30000; i++) begin
      int ys, r;
      int sel;
      y1 = YB_W'($urandom);
      y2 = YB_W'($urandom);
      if (i % 3 == 0) begin y1 = YB_W'($signed($urandom_range(0, 80000)) - 40000); y2 = YB_W'($signed($urandom_range(0, 2000)) - 1000); end
      if (i < 4) begin y1 = '0; y2 = '0; end   // y = 0 decides +1
      sel = $urandom_range(0, 2);
      cfg = (sel == 0) ? CFG_BOTH : (sel == 1) ? CFG_FIRST : CFG_SECOND;
      training = ($urandom_range(0, 1) == 1);
      t_sym    = ($urandom_range(0, 1) == 1);
      #1;
      ys = (sel == 0) ? int'(y1) + int'(y2) : (sel == 1) ? int'(y1) : int'(y2);
      if (training) r = t_sym ? 16384 : -16384;
      else          r = (ys >= 0) ? 16384 : -16384;
      checks += 3;
      if (int'(y) != ys)          begin failures++; $display("FAIL y %0d vs %0d", y, ys); end
      if (d_sym != (ys >= 0))     begin failures++; $display("FAIL d"); end
      if (int'(e) != ys - r)      begin failures++; $display("FAIL e %0d vs %0d", e, ys - r); end
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
