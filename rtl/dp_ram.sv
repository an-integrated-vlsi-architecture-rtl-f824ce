// dp_ram: simple dual-port RAM, one write port and one read port on the same clock.
// The read is synchronous: data for `raddr` appears one clock after `re`. A read of the
// address written in the same clock returns the old contents. DEPTH need not be a power of
// two (the cyclic-prefix buffer uses 1184 words).
module dp_ram #(
  parameter int unsigned DEPTH = 1184,
  parameter int unsigned W     = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
