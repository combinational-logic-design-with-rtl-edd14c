// lab1_tb: end-to-end test of the ID display at its default ID (..3456).
//
// The testbench plays the part of the two pushbuttons and of the display.
// It drives x with board levels (a pressed button reads low), walks the
// four switch values in the order 00, 01, 10, 11 and then in random order,
// and for each one decodes what a common-anode display wired to en, a..g
// and dp would show: exactly one anode high, at the position equal to the
// switch value counted from the left, drawing the ID digit of that
// position, with the decimal point dark. It counts how often each digit
// position was lit and fails if any never was. The design is
// combinational; a watchdog ends a stalled run with a failure.
module lab1_tb;
  import seg_ref_pkg::*;

  localparam int ID_DEC = 3456;   // decimal form of the default ID digits

  logic [1:0] x;
  logic [3:0] en;
  logic       a, b, c, d, e, f, g, dp;
  int         checks = 0;
  int         failures = 0;
  int         lit_count [4] = '{default: 0};

  lab1 dut (.x(x), .en(en), .a(a), .b(b), .c(c), .d(d), .e(e), .f(f), .g(g), .dp(dp));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [1:0] value);
    int pos, want, shown;
    x = ~value;                        // pressed = low level
    #10;
    want = (ID_DEC / (10 ** (3 - int'(value)))) % 10;
    pos = -1;
    for (int k = 0; k < 4; k++) if (en[3 - k]) pos = (pos == -1) ? k : -2;
    checks++;
    if (pos != int'(value)) begin
      failures++;
      $display("value %0d: en=%b, expected only position %0d lit", value, en, value);
    end else begin
      lit_count[pos]++;
    end
    shown = shown_digit({a, b, c, d, e, f, g});
    checks++;
    if (shown != want) begin
      failures++;
      $display("value %0d: segments %b show %0d, want %0d", value,
               {a, b, c, d, e, f, g}, shown, want);
    end
    checks++;
    if (dp !== 1'b1) begin
      failures++;
      $display("value %0d: dp lit", value);
    end
  endtask

  initial begin
    // both buttons released: the leftmost digit shows the thousands digit
    x = 2'b11;
    #10;
    checks++;
    if (en !== 4'b1000 || {a, b, c, d, e, f, g} !== pattern(3)) begin
      failures++;
      $display("released: en=%b seg=%b", en, {a, b, c, d, e, f, g});
    end
    for (int v = 0; v < 4; v++) check(2'(v));
    for (int n = 0; n < 32; n++) check(2'($urandom_range(3)));
    for (int k = 0; k < 4; k++) begin
      $display("position %0d lit %0d times", k, lit_count[k]);
      checks++;
      if (lit_count[k] == 0) begin
        failures++;
        $display("position %0d was never lit", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
