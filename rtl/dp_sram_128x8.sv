// dp_sram_128x8: two-port synchronous RAM, one per detector channel.
//
// Port A writes (we_a) or reads; port B only reads. Reads are registered:
// the word addressed in cycle t appears on rdata in cycle t+1 when the port's
// enable is high, and rdata holds otherwise. A read on port A in the same
// cycle as a write to it returns the old word. The chip used a compiled
// 128x8 dual-port SRAM macro; this register array has the same behaviour at
// the ports and synthesizes to a memory. Size follows the design; read and
// write timing is this model's own choice.
module dp_sram_128x8 #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en_a,
  input  logic             we_a,
  input  logic [AW-1:0]    addr_a,
  input  logic [WIDTH-1:0] wdata_a,
  output logic [WIDTH-1:0] rdata_a,
  input  logic             en_b,
  input  logic [AW-1:0]    addr_b,
  output logic [WIDTH-1:0] rdata_b
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en_a) begin
      if (we_a) mem[addr_a] <= wdata_a;
      rdata_a <= mem[addr_a];
    end
  end

  always_ff @(posedge clk) begin
    if (en_b) rdata_b <= mem[addr_b];
  end

endmodule
