// lab1_ids_tb: end-to-end test of the ID display with other IDs.
//
// Three copies of the design hold the IDs ..7890, ..0125 and ..6634, so
// that every decimal digit passes through the whole path at least once.
// For each switch value (driven as board levels, pressed = low) each copy
// must light only the selected position and draw the ID digit there, as
// decoded by the reference in seg_ref_pkg. A watchdog ends a stalled run
// with a failure.
module lab1_ids_tb;
  import seg_ref_pkg::*;

  localparam int NUM_IDS = 3;
  localparam int ID_DEC [NUM_IDS] = '{7890, 125, 6634};

  logic [1:0] x;
  logic [3:0] en  [NUM_IDS];
  logic [6:0] seg [NUM_IDS];
  logic       dp  [NUM_IDS];
  int         checks = 0;
  int         failures = 0;
  bit         seen [10] = '{default: 1'b0};

  lab1 #(.ID_DIGITS(16'h7890)) dut0 (.x(x), .en(en[0]),
    .a(seg[0][6]), .b(seg[0][5]), .c(seg[0][4]), .d(seg[0][3]),
    .e(seg[0][2]), .f(seg[0][1]), .g(seg[0][0]), .dp(dp[0]));
  lab1 #(.ID_DIGITS(16'h0125)) dut1 (.x(x), .en(en[1]),
    .a(seg[1][6]), .b(seg[1][5]), .c(seg[1][4]), .d(seg[1][3]),
    .e(seg[1][2]), .f(seg[1][1]), .g(seg[1][0]), .dp(dp[1]));
  lab1 #(.ID_DIGITS(16'h6634)) dut2 (.x(x), .en(en[2]),
    .a(seg[2][6]), .b(seg[2][5]), .c(seg[2][4]), .d(seg[2][3]),
    .e(seg[2][2]), .f(seg[2][1]), .g(seg[2][0]), .dp(dp[2]));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      x = ~2'(v);
      #10;
      for (int k = 0; k < NUM_IDS; k++) begin
        int want, shown;
        want = (ID_DEC[k] / (10 ** (3 - v))) % 10;
        shown = shown_digit(seg[k]);
        checks++;
        if (en[k] !== (4'b1000 >> v)) begin
          failures++;
          $display("id %0d value %0d: en=%b", ID_DEC[k], v, en[k]);
        end
        checks++;
        if (shown != want || dp[k] !== 1'b1) begin
          failures++;
          $display("id %0d value %0d: shows %0d dp=%b, want %0d", ID_DEC[k], v,
                   shown, dp[k], want);
        end else begin
          seen[want] = 1'b1;
        end
      end
    end
    for (int dgt = 0; dgt < 10; dgt++) begin
      checks++;
      if (!seen[dgt]) begin
        failures++;
        $display("digit %0d never shown", dgt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
