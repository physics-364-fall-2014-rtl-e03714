// tb_traffic_lamp_decode: compares the decoder with the phase table, written
// here as one row of letters per phase (east/west, north/south, walk).
module tb_traffic_lamp_decode;
  import lab26_pkg::*;
  logic [3:0] ticks;
  lamp_t ew, ns;
  logic walk;
  int checks = 0, failures = 0;

  traffic_lamp_decode dut (.ticks(ticks), .ew(ew), .ns(ns), .walk(walk));

  // G = green, Y = yellow, R = red; last letter: W = walk lamp on, - = off
  string table_rows [16] = '{"GR-", "GR-", "GR-", "YR-", "RG-", "RG-", "RG-", "RY-",
                             "RRW", "RRW", "RRW", "RRW", "RRW", "RRW", "RRW", "RRW"};

  function automatic lamp_t from_letter(byte c);
    return '{red: c == "R", yellow: c == "Y", green: c == "G"};
  endfunction

  initial begin
    for (int t = 0; t < 16; t++) begin
      ticks = 4'(t);
      #1;
      checks++;
      if (ew !== from_letter(table_rows[t][0]) || ns !== from_letter(table_rows[t][1]) ||
          walk !== (table_rows[t][2] == "W")) begin
        failures++;
        $display("FAIL ticks=%0d ew=%b ns=%b walk=%b expected %s", t, ew, ns, walk, table_rows[t]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
