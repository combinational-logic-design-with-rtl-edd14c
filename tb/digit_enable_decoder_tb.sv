// digit_enable_decoder_tb: exhaustive check of the digit enable decoder.
//
// For each of the four switch values the enables must be one-hot with the
// lit digit counted from the left: value 0 lights en[3], value 3 lights
// en[0]. A watchdog ends the run with a failure if it stalls.
module digit_enable_decoder_tb;
  import lab1_pkg::*;

  pos_t sel;
  en_t  en;
  int   checks = 0;
  int   failures = 0;

  digit_enable_decoder dut (.sel(sel), .en(en));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      en_t want;
      sel = pos_t'(i);
      #10;
      // position i from the left is anode 3-i
      want = '0;
      case (i)
        0: want = 4'b1000;
        1: want = 4'b0100;
        2: want = 4'b0010;
        default: want = 4'b0001;
      endcase
      checks++;
      if (en !== want) begin
        failures++;
        $display("sel %0d: en=%b want %b", i, en, want);
      end
      checks++;
      if (!$onehot(en)) begin
        failures++;
        $display("sel %0d: en=%b not one-hot", i, en);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
