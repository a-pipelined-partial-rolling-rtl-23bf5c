// sbox_rom: the 256 x 8-bit S-box look-up table of one S-Module (2 K-bit).
//
// Holds SubBytes(x) = affine(x^-1) for every byte x. The contents are fixed at
// elaboration from aes_pkg::sbox_table(), the way an FPGA block RAM used as ROM
// is loaded at configuration time. The read is asynchronous (data follows
// addr in the same clock), which is the timing of the rolling-part example
// this core follows: the address changes after a clock edge and the result is
// captured by the S-Module register at the next edge. On an FPGA two of these
// ROMs fit one dual-port 4 K-bit block RAM.
//
// Ports: addr (8) in, data (8) out. Purely combinational.
module sbox_rom
  import aes_pkg::*;
(
  input  logic [7:0] addr,
  output logic [7:0] data
);

  localparam logic [2047:0] TABLE = sbox_table();

  logic [7:0] rom [256];

  // ROM contents, fixed at elaboration (configuration) time
  initial begin
    for (int i = 0; i < 256; i++) rom[i] = TABLE[8*i +: 8];
  end

  assign data = rom[addr];

endmodule
