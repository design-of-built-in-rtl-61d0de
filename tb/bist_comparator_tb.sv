// bist_comparator_tb: drives the comparator with hand-made bus waveforms.
// For each of several frames the testbench steps the slot counter through
// slots 0..30, four cycles each, with SCL high in the second half of a
// slot, and puts on SDA the expected bit of each control, address and data
// slot, inverting a few chosen ones. Every data slot must give exactly one
// pulse, bit_error for the inverted bits and bit_correct for the others;
// START, ACK, STOP and idle slots must give none.
module bist_comparator_tb;
  import i2c_pkg::*;
  logic CLK = 0, reset_n = 0;
  logic [7:0] in_control, in_address, in_data;
  logic [SLOT_W-1:0] SD_COUNTER = '0;
  logic I2C_SCLK = 1, I2C_SDAT = 1;
  logic bit_correct, bit_error;
  int checks = 0, failures = 0;
  int n_ok, n_err;

  bist_comparator dut (.*);

  always #5 CLK = ~CLK;
  always @(posedge CLK) if (reset_n) begin
    if (bit_correct) n_ok++;
    if (bit_error)   n_err++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge CLK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] frame_bits;
    int flip_a, flip_b;
    repeat (3) @(posedge CLK);
    reset_n = 1;
    for (int f = 0; f < 6; f++) begin
      in_control = 8'($urandom); in_address = 8'($urandom); in_data = 8'($urandom);
      frame_bits = {in_control, in_address, in_data};
      flip_a = (f == 0) ? -1 : int'($urandom_range(0, 23));
      flip_b = (f < 3) ? -1 : int'($urandom_range(0, 23));
      for (int s = 0; s <= 30; s++) begin
        int k;    // index of this slot's bit in frame_bits, -1 if none
        k = -1;
        if (s >= 2 && s <= 9)   k = 23 - (s - 2);
        if (s >= 11 && s <= 18) k = 15 - (s - 11);
        if (s >= 20 && s <= 27) k = 7 - (s - 20);
        for (int p = 0; p < 4; p++) begin
          @(negedge CLK);
          if (p == 0) begin n_ok = 0; n_err = 0; end
          SD_COUNTER = 7'(s);
          I2C_SCLK   = (s == 0 || s == 1 || s == 30) ? 1'b1 : (p >= 2);
          if (p == 1) begin
            if (k >= 0) I2C_SDAT = frame_bits[k] ^ (k == flip_a || k == flip_b);
            else        I2C_SDAT = $urandom_range(0, 1) != 0;
          end
        end
        @(negedge CLK);
        if (k >= 0) begin
          if (k == flip_a || k == flip_b)
            check(n_err == 1 && n_ok == 0, $sformatf("frame %0d slot %0d flagged as error", f, s));
          else
            check(n_ok == 1 && n_err == 0, $sformatf("frame %0d slot %0d flagged as correct", f, s));
        end else begin
          check(n_ok == 0 && n_err == 0, $sformatf("frame %0d slot %0d not compared", f, s));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
