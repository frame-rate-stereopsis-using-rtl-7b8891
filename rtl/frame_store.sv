// frame_store: one frame store, a static RAM holding an image or an
// intermediate result.
//
// The original boards carry 512x512 8-bit frame stores built from 20 ns
// static RAM, with separate address, data and control lines for every store.
// With a 100 ns processing cycle such a RAM can serve more than one access
// per cycle; this model exposes that as two ports: port A reads or writes,
// port B only reads. Both reads are synchronous: data appear one clock after
// the address. A read on port B of the address written on port A in the same
// cycle returns the old contents. The default size is the original
// 2^18 x 8 bits; a store holding 16-bit words is instantiated as 2^17 x 16,
// the same capacity. The port arrangement and the read timing are this
// design's choices.
module frame_store #(
  parameter int unsigned ADDR_W = 18,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  // port A: read or write
  input  logic              a_en,
  input  logic              a_we,
  input  logic [ADDR_W-1:0] a_addr,
  input  logic [DATA_W-1:0] a_wdata,
  output logic [DATA_W-1:0] a_rdata,
  // port B: read only
  input  logic              b_en,
  input  logic [ADDR_W-1:0] b_addr,
  output logic [DATA_W-1:0] b_rdata
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      else      a_rdata     <= mem[a_addr];
    end
    if (b_en) b_rdata <= mem[b_addr];
  end

endmodule
