// data_detector_tb: every level of every modulation, at a received unit of
// 31 with noise up to +-(unit - 1) on the axis; the decided Gray bits must
// be the sent ones, level the sent level, and err = y - level * unit.
module data_detector_tb;
  import cdma_pkg::*;
  mod_t mode = MOD_QAM64;
  sample_t y = '0;
  logic [15:0] unit = 16'd31;
  logic [2:0] bits;
  logic signed [3:0] level;
  logic signed [19:0] err;
  int checks = 0, failures = 0;

  data_detector dut (.mode, .y, .unit, .bits, .level, .err);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s (mode %0d y %0d)", what, mode, y);
    end
  endtask

  initial begin
    for (int m = 0; m < 3; m++) begin
      mode = mod_t'(m);
      for (int g = 0; g < 8; g++) begin
        logic [2:0] gb;
        int l;
        gb = 3'(g);
        if (mode == MOD_QPSK && g > 1) continue;
        if (mode == MOD_QAM16 && g > 3) continue;
        l = int'(axis_level(mode, gb));
        for (int r = 0; r < 50; r++) begin
          int nz;
          nz = (r == 0) ? 0 : $urandom_range(0, 60) - 30;
          y = sample_t'(l * 31 + nz);
          #1;
          check(bits == gb, "decided bits");
          check(int'(level) == l, "decided level");
          check(int'(err) == int'(y) - l * 31, "decision error");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
