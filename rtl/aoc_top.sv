// aoc_top: Analytics-on-Chip fabric - an array of Nanocores with its stream
// and control infrastructure.
//
// An input stream (from the memory controller / DMA of the host processor)
// passes a gate held by the controller (bop_ctrl) and is dealt out in
// bursts over the active cores by nc_scatter; each core's results are
// collected round-robin by nc_gather into one output stream. The cores run
// on their own clock (clk) and cross to the system clock (sys_clk) in their
// stream FIFOs and dual-port memories, so they can run faster than the
// streams. The master processor reaches every core's instruction memory,
// scratch memory and control registers, and the fabric's own registers,
// through an AXI4-Lite port (axil_ctrl_bridge). After reset bop_ctrl loads
// the pricing kernel into every core and starts them; the master then sets
// the split (number of cores, input burst, output burst, result count, pad
// word) and writes GO, streams the batch in, and collects the results.
//
// Control word address (AXI byte address / 8), TAW = 13 + log2(N_CORES) bits:
//   bit TAW-1 = 0: core space, bits [TAW-2:12] core index, [11:0] core map
//                  (see nanocore)
//   bit TAW-1 = 1: fabric registers, index in bits [2:0]:
//     0 number of active cores   1 input words per core per round
//     2 output words per core per round   3 output words per batch
//     4 pad word   5 write bit0 = GO; read {done, state[1:0]}
//     6 bit0 = replicate the input stream to every active core
// The arrangement of master, cores, scatter and gather follows the
// document's architecture; the register map and the gating are this design's.
module aoc_top
  import nc_pkg::*;
#(
  parameter int unsigned N_CORES = 8,
  parameter int unsigned DATA_W  = 64,
  localparam int unsigned CW     = (N_CORES > 1) ? $clog2(N_CORES) : 1,
  localparam int unsigned TAW    = CB_AW + CW + 1,
  localparam int unsigned AXI_AW = 32,
  localparam int unsigned BW     = $clog2(DATA_W / 8)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sys_clk,
  input  logic              sys_rst_n,
  // AXI4-Lite control port from the master processor
  input  logic              s_axil_awvalid,
  output logic              s_axil_awready,
  input  logic [AXI_AW-1:0] s_axil_awaddr,
  input  logic              s_axil_wvalid,
  output logic              s_axil_wready,
  input  logic [DATA_W-1:0] s_axil_wdata,
  output logic              s_axil_bvalid,
  input  logic              s_axil_bready,
  output logic [1:0]        s_axil_bresp,
  input  logic              s_axil_arvalid,
  output logic              s_axil_arready,
  input  logic [AXI_AW-1:0] s_axil_araddr,
  output logic              s_axil_rvalid,
  input  logic              s_axil_rready,
  output logic [DATA_W-1:0] s_axil_rdata,
  output logic [1:0]        s_axil_rresp,
  // streaming input channel
  input  logic              s_axis_tvalid,
  output logic              s_axis_tready,
  input  logic [DATA_W-1:0] s_axis_tdata,
  input  logic              s_axis_tlast,
  // streaming output channel
  output logic              m_axis_tvalid,
  input  logic              m_axis_tready,
  output logic [DATA_W-1:0] m_axis_tdata,
  output logic              m_axis_tlast,
  // status
  output logic              done,
  output logic [1:0]        ctrl_state,
  output logic              scatter_padding,
  output logic              gather_dropping,
  output logic              bus_collision
);
  // ---------------- control bus ----------------
  logic                   br_req, br_we, ct_req, ct_we, bus_own;
  logic [AXI_AW-BW-1:0]   br_addr;
  logic [TAW-1:0]         ct_addr, cb_addr;
  logic [DATA_W-1:0]      br_wdata, ct_wdata, cb_wdata, cb_rdata;
  logic                   cb_req, cb_we;

  axil_ctrl_bridge #(.ADDR_W(AXI_AW), .DATA_W(DATA_W)) u_bridge (
    .clk(sys_clk), .rst_n(sys_rst_n), .hold(bus_own),
    .awvalid(s_axil_awvalid), .awready(s_axil_awready), .awaddr(s_axil_awaddr),
    .wvalid(s_axil_wvalid), .wready(s_axil_wready), .wdata(s_axil_wdata),
    .bvalid(s_axil_bvalid), .bready(s_axil_bready), .bresp(s_axil_bresp),
    .arvalid(s_axil_arvalid), .arready(s_axil_arready), .araddr(s_axil_araddr),
    .rvalid(s_axil_rvalid), .rready(s_axil_rready), .rdata(s_axil_rdata), .rresp(s_axil_rresp),
    .cb_req(br_req), .cb_we(br_we), .cb_addr(br_addr), .cb_wdata(br_wdata),
    .cb_rdata(cb_rdata), .collision(bus_collision));

  assign cb_req   = bus_own ? ct_req   : br_req;
  assign cb_we    = bus_own ? ct_we    : br_we;
  assign cb_addr  = bus_own ? ct_addr  : br_addr[TAW-1:0];
  assign cb_wdata = bus_own ? ct_wdata : br_wdata;

  logic          glb_sel;
  logic [CW-1:0] core_sel;
  assign glb_sel  = cb_addr[TAW-1];
  assign core_sel = cb_addr[CB_AW +: CW];

  // ---------------- fabric registers ----------------
  logic [CW:0]       cfg_ncores;
  logic [15:0]       cfg_in_burst, cfg_out_burst;
  logic [31:0]       cfg_total;
  logic [DATA_W-1:0] cfg_pad, glb_rdata;
  logic              go, cfg_replicate;
  logic              glb_q;
  logic [CW-1:0]     core_q;

  always_ff @(posedge sys_clk or negedge sys_rst_n) begin
    if (!sys_rst_n) begin
      cfg_ncores <= (CW+1)'(N_CORES); cfg_in_burst <= 16'd1; cfg_out_burst <= 16'd1;
      cfg_total <= 32'd1; cfg_pad <= '0; go <= 1'b0; glb_rdata <= '0; cfg_replicate <= 1'b0;
      glb_q <= 1'b0; core_q <= '0;
    end else begin
      go <= 1'b0;
      if (cb_req) begin glb_q <= glb_sel; core_q <= core_sel; end
      if (cb_req && glb_sel && cb_we) begin
        case (cb_addr[2:0])
          3'd0: cfg_ncores    <= cb_wdata[CW:0];
          3'd1: cfg_in_burst  <= cb_wdata[15:0];
          3'd2: cfg_out_burst <= cb_wdata[15:0];
          3'd3: cfg_total     <= cb_wdata[31:0];
          3'd4: cfg_pad       <= cb_wdata;
          3'd5: go            <= cb_wdata[0];
          3'd6: cfg_replicate <= cb_wdata[0];
          default: ;
        endcase
      end
      if (cb_req && glb_sel && !cb_we) begin
        case (cb_addr[2:0])
          3'd0: glb_rdata <= DATA_W'(cfg_ncores);
          3'd1: glb_rdata <= DATA_W'(cfg_in_burst);
          3'd2: glb_rdata <= DATA_W'(cfg_out_burst);
          3'd3: glb_rdata <= DATA_W'(cfg_total);
          3'd4: glb_rdata <= cfg_pad;
          3'd5: glb_rdata <= DATA_W'({done, ctrl_state});
          3'd6: glb_rdata <= DATA_W'(cfg_replicate);
          default: glb_rdata <= '0;
        endcase
      end
    end
  end

  // ---------------- controller ----------------
  logic in_last_taken, batch_done, gate_open;
  bop_ctrl #(.N_CORES(N_CORES), .DATA_W(DATA_W)) u_ctrl (
    .clk(sys_clk), .rst_n(sys_rst_n), .go, .in_last_taken, .batch_done, .gate_open,
    .bus_own, .cb_req(ct_req), .cb_we(ct_we), .cb_addr(ct_addr), .cb_wdata(ct_wdata),
    .state_o(ctrl_state), .done);

  // ---------------- stream path ----------------
  logic                sc_s_valid, sc_s_ready;
  logic [N_CORES-1:0]  sc_valid, sc_ready, ga_valid, ga_ready;
  logic [DATA_W-1:0]   sc_data;
  logic [DATA_W-1:0]   core_out [N_CORES];
  logic [DATA_W-1:0]   core_rdata [N_CORES];

  assign sc_s_valid    = s_axis_tvalid && gate_open;
  assign s_axis_tready = sc_s_ready && gate_open;
  assign in_last_taken = s_axis_tvalid && s_axis_tready && s_axis_tlast;

  nc_scatter #(.N_CORES(N_CORES), .DATA_W(DATA_W)) u_scatter (
    .clk(sys_clk), .rst_n(sys_rst_n), .cfg_ncores, .cfg_burst(cfg_in_burst), .cfg_pad, .cfg_replicate,
    .s_valid(sc_s_valid), .s_ready(sc_s_ready), .s_data(s_axis_tdata), .s_last(s_axis_tlast),
    .m_valid(sc_valid), .m_ready(sc_ready), .m_data(sc_data), .padding(scatter_padding));

  for (genvar c = 0; c < int'(N_CORES); c++) begin : g_core
    nanocore #(.DATA_W(DATA_W)) u_core (
      .clk, .rst_n, .sys_clk, .sys_rst_n,
      .cb_req(cb_req && !glb_sel && core_sel == CW'(c)), .cb_we,
      .cb_addr(cb_addr[CB_AW-1:0]), .cb_wdata, .cb_rdata(core_rdata[c]),
      .s_valid(sc_valid[c]), .s_ready(sc_ready[c]), .s_data(sc_data),
      .m_valid(ga_valid[c]), .m_ready(ga_ready[c]), .m_data(core_out[c]));
  end

  assign cb_rdata = glb_q ? glb_rdata : core_rdata[core_q];

  nc_gather #(.N_CORES(N_CORES), .DATA_W(DATA_W)) u_gather (
    .clk(sys_clk), .rst_n(sys_rst_n), .cfg_ncores, .cfg_burst(cfg_out_burst), .cfg_total,
    .s_valid(ga_valid), .s_ready(ga_ready), .s_data(core_out),
    .m_valid(m_axis_tvalid), .m_ready(m_axis_tready), .m_data(m_axis_tdata),
    .m_last(m_axis_tlast), .dropping(gather_dropping), .batch_done);
endmodule
