// lfsr8_tb: checks the 8-bit pattern generator. After reset the output must
// equal the seed; with enable low it must hold; with enable high each step
// must match a reference shift register computed here from the tap mask of
// x^8+x^6+x^5+x^4+1, and the sequence must visit all 255 non-zero states
// before repeating.
module lfsr8_tb;
  logic       CLK = 0, enable = 0, reset = 1;
  logic [7:0] q, ref_q;
  int checks = 0, failures = 0;
  bit seen [256];

  lfsr8 #(.SEED(8'h5A)) dut (.*);

  always #5 CLK = ~CLK;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s q=%h ref=%h", what, q, ref_q); end
  endtask

  initial begin
    repeat (20000) @(posedge CLK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge CLK);
    #1 reset = 0;
    check(q == 8'h5A, "seed after reset");
    repeat (5) @(posedge CLK);
    #1 check(q == 8'h5A, "hold with enable low");
    ref_q = 8'h5A;
    enable = 1;
    for (int i = 0; i < 255; i++) begin
      check(!seen[q], "state repeats early");
      seen[q] = 1;
      @(posedge CLK); #1;
      ref_q = {ref_q[6:0], ^(ref_q & 8'b1011_1000)};
      check(q == ref_q, "step");
    end
    check(q == 8'h5A, "period 255");
    check(!seen[0], "zero state");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
