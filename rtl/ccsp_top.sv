// ccsp_top: the four-tile prototype system around its crossbar.
//
// Four tiles, each with its L1, configurable L2 cache/scratchpad and
// integrated NI, connect through a 5-port input-queued crossbar; port 4
// belongs to the DRAM controller, which is not part of this RTL, so its
// crossbar port is brought out (ddr_*), as are the four processor data buses.
// Tiles run on clk, the crossbar and the NoC side of the tile FIFOs on
// clk_noc. Tile i answers to the addresses of node i (see ccsp_pkg).
module ccsp_top
  import ccsp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clk_noc,
  input  logic        rst_noc_n,
  input  logic  [NODES-1:0]        cpu_req,
  input  logic  [NODES-1:0]        cpu_we,
  input  logic  [NODES-1:0][31:0]  cpu_addr,
  input  logic  [NODES-1:0][31:0]  cpu_wdata,
  input  logic  [NODES-1:0][3:0]   cpu_be,
  output logic  [NODES-1:0]        cpu_ack,
  output logic  [NODES-1:0][31:0]  cpu_rdata,
  output logic  [NODES-1:0]        cpu_err,
  output logic  [NODES-1:0]        init_busy,
  // DRAM controller port of the crossbar
  output logic        ddr_in_valid,    // packets to the DRAM controller
  input  logic        ddr_in_ready,
  output flit_t       ddr_in_data,
  input  logic        ddr_out_valid,   // packets from the DRAM controller
  output logic        ddr_out_ready,
  input  flit_t       ddr_out_data,
  output tile_ev_t [NODES-1:0] ev
);
  logic  [NODES:0] x_in_valid, x_in_ready, x_out_valid, x_out_ready;
  flit_t [NODES:0] x_in_data, x_out_data;

  for (genvar i = 0; i < NODES; i++) begin : g_tile
    tile #(.NODE_ID(NODE_W'(i))) u_tile (
      .clk, .rst_n, .clk_noc, .rst_noc_n,
      .cpu_req(cpu_req[i]), .cpu_we(cpu_we[i]), .cpu_addr(cpu_addr[i]),
      .cpu_wdata(cpu_wdata[i]), .cpu_be(cpu_be[i]), .cpu_ack(cpu_ack[i]),
      .cpu_rdata(cpu_rdata[i]), .cpu_err(cpu_err[i]), .init_busy(init_busy[i]),
      .noc_out_valid(x_in_valid[i]), .noc_out_ready(x_in_ready[i]), .noc_out_data(x_in_data[i]),
      .noc_in_valid(x_out_valid[i]), .noc_in_ready(x_out_ready[i]), .noc_in_data(x_out_data[i]),
      .ev(ev[i]));
  end

  assign x_in_valid[NODES]  = ddr_out_valid;
  assign ddr_out_ready      = x_in_ready[NODES];
  assign x_in_data[NODES]   = ddr_out_data;
  assign ddr_in_valid       = x_out_valid[NODES];
  assign x_out_ready[NODES] = ddr_in_ready;
  assign ddr_in_data        = x_out_data[NODES];

  xbar #(.PORTS(NODES+1)) u_xbar (
    .clk(clk_noc), .rst_n(rst_noc_n),
    .in_valid(x_in_valid), .in_ready(x_in_ready), .in_data(x_in_data),
    .out_valid(x_out_valid), .out_ready(x_out_ready), .out_data(x_out_data));
endmodule
