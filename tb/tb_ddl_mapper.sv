// Testbench for ddl_mapper: every (tap_sel, word) pair of the 256-cell,
// 8-bit configuration against cal_sel = min(floor(tap_sel*word/128), 255),
// plus a 64-cell configuration (divisor 32).
module tb_ddl_mapper;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic [7:0] ts, w, cs;
  logic [5:0] ts6, w6, cs6;

  ddl_mapper                 dut   (.tap_sel(ts),  .word(w),  .cal_sel(cs));
  ddl_mapper #(.NCELLS(64))  dut64 (.tap_sel(ts6), .word(w6), .cal_sel(cs6));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        ts = 8'(a); w = 8'(b);
        #1;
        e = (a * b) / 128;
        if (e > 255) e = 255;
        checks++;
        if (cs !== 8'(e)) begin
          failures++;
          if (failures < 10) $display("FAIL ts=%0d w=%0d got %0d exp %0d", a, b, cs, e);
        end
      end
    end
    for (int a = 0; a < 64; a++) begin
      for (int b = 0; b < 64; b++) begin
        ts6 = 6'(a); w6 = 6'(b);
        #1;
        e = (a * b) / 32;
        if (e > 63) e = 63;
        checks++;
        if (cs6 !== 6'(e)) begin
          failures++;
          if (failures < 10) $display("FAIL64 ts=%0d w=%0d got %0d exp %0d", a, b, cs6, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
