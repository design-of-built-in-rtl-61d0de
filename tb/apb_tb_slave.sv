// apb_tb_slave: testbench model of an APB slave with 64 32-bit words,
// addressed by PADDR[7:2]. It answers in the ENABLE cycle (no wait states)
// and counts writes, reads and protocol errors: PENABLE without PSEL,
// an ENABLE cycle not preceded by SETUP, or address, direction or write
// data changing between SETUP and ENABLE.
module apb_tb_slave #(
  parameter int AW = 8
) (
  input  logic          clk,
  input  logic [AW-1:0] PADDR,
  input  logic          PSEL,
  input  logic          PENABLE,
  input  logic          PWRITE,
  input  logic [31:0]   PWDATA,
  output logic [31:0]   PRDATA
);
  logic [31:0] mem [64];
  int writes = 0, reads = 0, proto_err = 0;
  logic          setup_d = 0;
  logic [AW-1:0] paddr_d;
  logic          pwrite_d;
  logic [31:0]   pwdata_d;
  logic [AW-1:0] last_addr;

  assign PRDATA = mem[PADDR[7:2]];

  always @(posedge clk) begin
    if (PENABLE && !PSEL) proto_err++;
    if (PSEL && PENABLE) begin
      if (!setup_d || PADDR != paddr_d || PWRITE != pwrite_d || (PWRITE && PWDATA != pwdata_d))
        proto_err++;
      last_addr = PADDR;
      if (PWRITE) begin mem[PADDR[7:2]] = PWDATA; writes++; end
      else reads++;
    end
    setup_d  = PSEL && !PENABLE;
    paddr_d  = PADDR;
    pwrite_d = PWRITE;
    pwdata_d = PWDATA;
  end
endmodule
