// shuffle_network: switch that connects frame-store ports to the logic that
// uses them.
//
// In the original boards the frame stores are connected through a shuffle
// network to several FPGAs so that a store can be handed from one stage to
// the next between passes. Here each of NDST store ports is driven by the
// source named in st_sel (a full crossbar of address, data and control), and
// each of NSRC sources sees the read data of the store named in src_sel.
// Read data come from the stores one clock after the address, so src_sel
// must be held one clock longer than st_sel when a source reads; the
// controller changes both only between passes. Purely combinational. The
// crossbar structure is this design's choice: the original is only named.
module shuffle_network #(
  parameter int unsigned NSRC   = 8,
  parameter int unsigned NDST   = 4,
  parameter int unsigned ADDR_W = 18,
  parameter int unsigned DATA_W = 16,
  localparam int unsigned SW    = (NSRC > 1) ? $clog2(NSRC) : 1,
  localparam int unsigned DW    = (NDST > 1) ? $clog2(NDST) : 1
) (
  // sources
  input  logic              src_en    [NSRC],
  input  logic              src_we    [NSRC],
  input  logic [ADDR_W-1:0] src_addr  [NSRC],
  input  logic [DATA_W-1:0] src_wdata [NSRC],
  output logic [DATA_W-1:0] src_rdata [NSRC],
  input  logic [DW-1:0]     src_sel   [NSRC],
  // store ports
  input  logic [SW-1:0]     st_sel    [NDST],
  output logic              st_en     [NDST],
  output logic              st_we     [NDST],
  output logic [ADDR_W-1:0] st_addr   [NDST],
  output logic [DATA_W-1:0] st_wdata  [NDST],
  input  logic [DATA_W-1:0] st_rdata  [NDST]
);

  always_comb begin
    for (int s = 0; s < NDST; s++) begin
      st_en[s]    = src_en[st_sel[s]];
      st_we[s]    = src_we[st_sel[s]];
      st_addr[s]  = src_addr[st_sel[s]];
      st_wdata[s] = src_wdata[st_sel[s]];
    end
    for (int i = 0; i < NSRC; i++)
      src_rdata[i] = st_rdata[src_sel[i]];
  end

endmodule
