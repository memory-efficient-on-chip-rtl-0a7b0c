// noc_top: 5x5 mesh network-on-chip in configuration A.
//
// Rows 0, 2 and 4 of the mesh hold the 15 memory tiles (slave NI with the order-sensitive
// DRAM controller, one DDR2 device each); rows 1 and 3 hold the 10 processor tiles (master NI
// with the reorder unit, one AXI master each). Every tile has a priority-based router; the
// routers are linked to their north, east, south and west neighbours with one flit link and
// one credit line per virtual channel in each direction. Row y grows southward and column x
// eastward.
// Master m sits at x = m % 5, y = 2*(m / 5) + 1; memory m at x = m % 5, y = 2*(m / 5). A master
// addresses memory m with address bits [31:28] = m; bits [27:0] are the address inside the
// 256 MB device.
// With CONFIG_B set, the mesh is configuration B instead: all 25 tiles hold a processor and a
// memory behind a hybrid NI; tile n = 5*y + x owns AXI port n and DRAM port n, and address bits
// [31:27] name the target tile (see noc_pkg::tile_node). Configuration A is the default.
// The processors and DRAM devices are outside this module: their ports are
// brought out as arrays of structs. All tiles share one clock, as in the document's
// evaluation (cores, routers and memories at the same frequency).
module noc_top
  import noc_pkg::*;
#(
  parameter int unsigned RB_WORDS  = 48,
  parameter bit          CONFIG_B  = 1'b0,
  localparam int unsigned N_MASTERS = CONFIG_B ? 25 : 10,
  localparam int unsigned N_MEMS    = CONFIG_B ? 25 : 15
) (
  input  logic       clk,
  input  logic       rst_n,
  input  axi_m2s_t   m_axi_req [N_MASTERS],
  output axi_s2m_t   m_axi_rsp [N_MASTERS],
  output dram_req_t  dram_req  [N_MEMS],
  input  dram_rsp_t  dram_rsp  [N_MEMS]
);
  link_t           r_in     [MESH_Y][MESH_X][N_PORTS];
  link_t           r_out    [MESH_Y][MESH_X][N_PORTS];
  logic [N_VC-1:0] r_in_cr  [MESH_Y][MESH_X][N_PORTS];
  logic [N_VC-1:0] r_out_cr [MESH_Y][MESH_X][N_PORTS];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      router #(.X(x), .Y(y)) u_router (
        .clk, .rst_n,
        .in_link(r_in[y][x]), .in_credit(r_in_cr[y][x]),
        .out_link(r_out[y][x]), .out_credit(r_out_cr[y][x]));

      // mesh links
      if (y > 0) begin : g_n
        assign r_in[y][x][PORT_N]     = r_out[y-1][x][PORT_S];
        assign r_out_cr[y][x][PORT_N] = r_in_cr[y-1][x][PORT_S];
      end else begin : g_nb
        assign r_in[y][x][PORT_N]     = '0;
        assign r_out_cr[y][x][PORT_N] = '0;
      end
      if (y < MESH_Y - 1) begin : g_s
        assign r_in[y][x][PORT_S]     = r_out[y+1][x][PORT_N];
        assign r_out_cr[y][x][PORT_S] = r_in_cr[y+1][x][PORT_N];
      end else begin : g_sb
        assign r_in[y][x][PORT_S]     = '0;
        assign r_out_cr[y][x][PORT_S] = '0;
      end
      if (x > 0) begin : g_w
        assign r_in[y][x][PORT_W]     = r_out[y][x-1][PORT_E];
        assign r_out_cr[y][x][PORT_W] = r_in_cr[y][x-1][PORT_E];
      end else begin : g_wb
        assign r_in[y][x][PORT_W]     = '0;
        assign r_out_cr[y][x][PORT_W] = '0;
      end
      if (x < MESH_X - 1) begin : g_e
        assign r_in[y][x][PORT_E]     = r_out[y][x+1][PORT_W];
        assign r_out_cr[y][x][PORT_E] = r_in_cr[y][x+1][PORT_W];
      end else begin : g_eb
        assign r_in[y][x][PORT_E]     = '0;
        assign r_out_cr[y][x][PORT_E] = '0;
      end

      // tiles
      if (CONFIG_B) begin : g_h
        hybrid_ni #(.X(x), .Y(y), .RB_WORDS(RB_WORDS)) u_ni (
          .clk, .rst_n,
          .axi_req(m_axi_req[y*MESH_X + x]), .axi_rsp(m_axi_rsp[y*MESH_X + x]),
          .dram_req(dram_req[y*MESH_X + x]), .dram_rsp(dram_rsp[y*MESH_X + x]),
          .out_link(r_in[y][x][PORT_L]), .out_credit(r_in_cr[y][x][PORT_L]),
          .in_link(r_out[y][x][PORT_L]), .in_credit(r_out_cr[y][x][PORT_L]));
      end else if (y % 2 == 1) begin : g_m
        master_ni #(.X(x), .Y(y), .RB_WORDS(RB_WORDS)) u_ni (
          .clk, .rst_n,
          .axi_req(m_axi_req[(y/2)*MESH_X + x]), .axi_rsp(m_axi_rsp[(y/2)*MESH_X + x]),
          .out_link(r_in[y][x][PORT_L]), .out_credit(r_in_cr[y][x][PORT_L]),
          .in_link(r_out[y][x][PORT_L]), .in_credit(r_out_cr[y][x][PORT_L]));
      end else begin : g_s_ni
        slave_ni #(.X(x), .Y(y)) u_ni (
          .clk, .rst_n,
          .in_link(r_out[y][x][PORT_L]), .in_credit(r_out_cr[y][x][PORT_L]),
          .out_link(r_in[y][x][PORT_L]), .out_credit(r_in_cr[y][x][PORT_L]),
          .dram_req(dram_req[(y/2)*MESH_X + x]), .dram_rsp(dram_rsp[(y/2)*MESH_X + x]));
      end
    end
  end
endmodule
