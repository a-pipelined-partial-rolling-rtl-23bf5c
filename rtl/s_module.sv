// s_module: S-Module of a rolling part, one S-box ROM plus a feedback register.
//
// Each clock the byte on addr is substituted by the ROM and shifted into an
// 8*STEPS-bit register, so after STEPS clocks the register holds the S-box
// results of the last STEPS bytes, the oldest in the most significant byte.
// With STEPS=4 (rolling part 4SM) the register is 32 bits and gathers one full
// state column; with STEPS=2 (8SM) it is 16 bits and gathers half a column.
// The register needs no reset: its content is only used after STEPS shifts.
//
// Ports: clk, addr (8) in; acc (8*STEPS) out, registered.
module s_module #(
  parameter int unsigned STEPS = 4
) (
  input  logic                 clk,
  input  logic [7:0]           addr,
  output logic [8*STEPS-1:0]   acc
);

  logic [7:0] sub;

  sbox_rom u_rom (.addr(addr), .data(sub));

  if (STEPS == 1) begin : g_one
    always_ff @(posedge clk) acc <= sub;
  end else begin : g_shift
    always_ff @(posedge clk) acc <= {acc[8*STEPS-9:0], sub};
  end

endmodule
