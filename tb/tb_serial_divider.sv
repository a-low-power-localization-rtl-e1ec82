// tb_serial_divider: self-checking test of the serial divider.
//
// Random signed numerators and divisors, including quotients that do not fit
// in 10 bits and zero divisors. The expected quotient is the integer quotient
// rounded to nearest (halves away from zero), computed here with plain
// integer arithmetic; a result
// above 1023 must raise ovf and give 1023, a zero divisor must raise dz.
// done must come exactly 10 cycles after start.
module tb_serial_divider;
  localparam int NW = 29, DW = 16, QW = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, done, q_neg, ovf, dz;
  logic signed [NW-1:0] num;
  logic signed [DW-1:0] den;
  logic [QW-1:0] q;

  serial_divider #(.NW(NW), .DW(DW), .QW(QW)) dut (.*);

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint n, d, eq, got;
    int cyc;
    bit eovf;
    start = 0; num = 0; den = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      d = longint'($urandom_range(0, 60000)) - 30000;
      if (t % 7 == 0) d = longint'($urandom_range(0, 20)) - 10;
      if (t == 5) d = 0;
      if (t == 6) d = -32768;
      n = (t % 3 == 0) ? d * (longint'($urandom_range(0, 2400)) - 1200) + longint'($urandom_range(0, 100)) - 50
                       : longint'($urandom_range(0, 400000)) - 200000;
      if (t == 7) begin n = -(longint'(1) << 28); d = 32767; end
      @(negedge clk); num = NW'(n); den = DW'(d); start = 1;
      @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != QW) begin failures++; $display("FAIL latency %0d", cyc); end
      checks++;
      if (d == 0) begin
        if (!dz || !ovf) begin failures++; $display("FAIL divide by zero not flagged"); end
      end else begin
        // rounded to nearest, halves away from zero
        eq = ((n < 0 ? -n : n) + (d < 0 ? -d : d) / 2) / (d < 0 ? -d : d);
        if ((n < 0) != (d < 0)) eq = -eq;
        eovf = (eq > 1023 || eq < -1023);
        if (eovf) eq = (eq < 0) ? -1023 : 1023;
        got = q_neg ? -longint'(q) : longint'(q);
        if (got != eq || ovf != eovf || dz) begin
          failures++;
          $display("FAIL %0d / %0d: got %0d ovf %0d exp %0d ovf %0d", n, d, got, ovf, eq, eovf);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
