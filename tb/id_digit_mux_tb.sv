// id_digit_mux_tb: checks the ID digit multiplexer for several IDs.
//
// Three instances hold different IDs, together covering every decimal
// digit in every position. The expected digit is taken from a decimal
// number (the ID's last four digits) by division, position 0 being the
// thousands digit. A watchdog ends the run with a failure if it stalls.
module id_digit_mux_tb;
  import lab1_pkg::*;

  localparam int NUM_IDS = 3;
  localparam int ID_DEC [NUM_IDS] = '{3456, 7890, 1212};

  pos_t sel;
  bcd_t digit [NUM_IDS];
  int   checks = 0;
  int   failures = 0;

  id_digit_mux                        dut0 (.sel(sel), .digit(digit[0]));
  id_digit_mux #(.ID_DIGITS(16'h7890)) dut1 (.sel(sel), .digit(digit[1]));
  id_digit_mux #(.ID_DIGITS(16'h1212)) dut2 (.sel(sel), .digit(digit[2]));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      sel = pos_t'(i);
      #10;
      for (int k = 0; k < NUM_IDS; k++) begin
        int want;
        want = (ID_DEC[k] / (10 ** (3 - i))) % 10;
        checks++;
        if (int'(digit[k]) != want) begin
          failures++;
          $display("id %0d sel %0d: digit=%0d want %0d", ID_DEC[k], i, digit[k], want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
