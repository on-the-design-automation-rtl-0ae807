// tb_mba_rom: reads every word of two ROM submodules and compares it with the
// sum of the weights selected by the address bits: the default 8-line ROM
// (weights a_0..a_7 of the default set) and a 3-line ROM with extreme weights.
module tb_mba_rom;
  import mba_pkg::*;
  int checks = 0, failures = 0;

  localparam logic [2:0][7:0] C3 = {-8'sd128, 8'sd127, -8'sd1};

  logic [7:0]  addr8;
  logic [10:0] data8;
  logic [2:0]  addr3;
  logic [9:0]  data3;

  mba_rom               u8 (.addr(addr8), .data(data8));
  mba_rom #(.NL(3), .COEF(C3)) u3 (.addr(addr3), .data(data3));

  initial begin
    for (int w = 0; w < 256; w++) begin
      automatic int ref_v = 0;
      for (int b = 0; b < 8; b++) if (w[b]) ref_v += int'(signed'(DEFAULT_COEF[b]));
      addr8 = 8'(w);
      #1;
      checks++;
      if (int'(signed'(data8)) != ref_v) begin
        failures++;
        $display("8-line ROM[%0d] = %0d, expected %0d", w, signed'(data8), ref_v);
      end
    end
    for (int w = 0; w < 8; w++) begin
      automatic int ref_v = (w[0] ? -1 : 0) + (w[1] ? 127 : 0) + (w[2] ? -128 : 0);
      addr3 = 3'(w);
      #1;
      checks++;
      if (int'(signed'(data3)) != ref_v) begin
        failures++;
        $display("3-line ROM[%0d] = %0d, expected %0d", w, signed'(data3), ref_v);
      end
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
