// axil_ctrl_bridge: AXI4-Lite slave in front of the single control port.
//
// AXI4-Lite can carry a read and a write at the same time on its separate
// channels, but the Nanocore control interface has only one address port.
// This bridge serialises them: while a write is in progress the read
// channel is blocked and vice versa, and when a write (address and data both
// present) and a read arrive in the same cycle the write goes first. Each
// transfer is one request cycle on the control port (cb_req); read data is
// taken from cb_rdata on the following cycle. The byte address is turned
// into a word address by dropping the low log2(DATA_W/8) bits. Responses are
// always OKAY; write strobes are ignored (whole-word writes). The blocking
// scheme and the write priority follow the document; the state machine and
// response handling are this design's choice. The hold input keeps new
// transfers from being accepted (used while another master owns the port).
module axil_ctrl_bridge #(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned DATA_W = 64,
  localparam int unsigned BW    = $clog2(DATA_W / 8)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                hold,
  // AXI4-Lite slave
  input  logic                awvalid,
  output logic                awready,
  input  logic [ADDR_W-1:0]   awaddr,
  input  logic                wvalid,
  output logic                wready,
  input  logic [DATA_W-1:0]   wdata,
  output logic                bvalid,
  input  logic                bready,
  output logic [1:0]          bresp,
  input  logic                arvalid,
  output logic                arready,
  input  logic [ADDR_W-1:0]   araddr,
  output logic                rvalid,
  input  logic                rready,
  output logic [DATA_W-1:0]   rdata,
  output logic [1:0]          rresp,
  // control port
  output logic                cb_req,
  output logic                cb_we,
  output logic [ADDR_W-BW-1:0] cb_addr,
  output logic [DATA_W-1:0]   cb_wdata,
  input  logic [DATA_W-1:0]   cb_rdata,
  output logic                collision   // pulses when a read waited for a write
);
  typedef enum logic [1:0] {S_IDLE, S_BRESP, S_RDATA, S_RRESP} state_e;
  state_e state;

  logic do_wr, do_rd;
  assign do_wr = (state == S_IDLE) && !hold && awvalid && wvalid;
  assign do_rd = (state == S_IDLE) && !hold && arvalid && !do_wr;

  assign awready  = do_wr;
  assign wready   = do_wr;
  assign arready  = do_rd;
  assign cb_req   = do_wr || do_rd;
  assign cb_we    = do_wr;
  assign cb_addr  = do_wr ? awaddr[ADDR_W-1:BW] : araddr[ADDR_W-1:BW];
  assign cb_wdata = wdata;
  assign bvalid   = (state == S_BRESP);
  assign rvalid   = (state == S_RRESP);
  assign bresp    = 2'b00;
  assign rresp    = 2'b00;
  assign collision = do_wr && arvalid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      rdata <= '0;
    end else begin
      case (state)
        S_IDLE:  if (do_wr) state <= S_BRESP; else if (do_rd) state <= S_RDATA;
        S_BRESP: if (bready) state <= S_IDLE;
        S_RDATA: begin rdata <= cb_rdata; state <= S_RRESP; end
        S_RRESP: if (rready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_one_at_a_time: assert property (@(posedge clk) disable iff (!rst_n) !(bvalid && rvalid))
    else $error("axil_ctrl_bridge: read and write in flight together");
endmodule
