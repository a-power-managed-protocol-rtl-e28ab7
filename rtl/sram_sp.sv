// sram_sp: single-port synchronous RAM, used for the microcontroller's 64 kB
// program/data memory.
//
// One access per cycle: with `en` high, `we` high writes `wdata` to `addr`,
// `we` low reads `addr` and presents the word on `rdata` after the next clock
// edge; `rdata` holds its value while `en` is low. The memory content is not
// reset, as in an SRAM macro; it is retained while the domain sleeps because
// the retention voltage keeps the state. The 64 kB byte-wide size follows the
// published design; the port protocol is this implementation's choice.
module sram_sp #(
  parameter int unsigned DEPTH = 65536,
  parameter int unsigned W     = 8
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [W-1:0]             wdata,
  output logic [W-1:0]             rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
