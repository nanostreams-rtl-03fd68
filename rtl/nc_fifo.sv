// nc_fifo: stream buffer of a Nanocore (input or output FIFO).
//
// A dual-clock first-in first-out buffer that carries a data stream across
// from the clock of the stream side to the clock of the core (input FIFO) or
// back (output FIFO), so the cores can run faster than the data streams.
// Pointers are kept in Gray code and each is passed through a two-flop
// synchroniser into the other domain; full and empty are therefore
// conservative for two clocks after a change on the far side. The write side
// has a valid/ready handshake in AXI-Stream style, ready being the inverse
// of full. The read side shows the head word with show-ahead ("first word
// fall through") semantics and reports the number of words it holds (the
// "count" the core's decoder watches) so the core can block on an empty
// FIFO. Depth (512 words, half a block RAM in the 32-bit core) and the
// Gray-code construction are this design's reading of the document.
// Each side has its own active-low reset; both must be asserted together.
module nc_fifo #(
  parameter int unsigned DATA_W = 64,
  parameter int unsigned DEPTH  = 512,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              wclk,
  input  logic              wrst_n,
  input  logic              s_valid,
  output logic              s_ready,
  input  logic [DATA_W-1:0] s_data,
  input  logic              rclk,
  input  logic              rrst_n,
  input  logic              r_pop,
  output logic              r_empty,
  output logic [DATA_W-1:0] r_data,
  output logic [AW:0]       r_count
);
  logic [DATA_W-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer in write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer in read domain
  logic [AW:0] wbin_next, rbin_next, rbin_w, wbin_r;
  logic        full, push, pop;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side ----------------
  assign rbin_w    = gray2bin(rgray_w2);
  assign full      = (wbin - rbin_w) == (AW+1)'(DEPTH);
  assign s_ready   = !full;
  assign push      = s_valid && !full;
  assign wbin_next = wbin + (AW+1)'(push);

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_next;
      wgray    <= bin2gray(wbin_next);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  always_ff @(posedge wclk) if (push) mem[wbin[AW-1:0]] <= s_data;

  // ---------------- read side ----------------
  assign wbin_r    = gray2bin(wgray_r2);
  assign r_count   = wbin_r - rbin;
  assign r_empty   = (r_count == '0);
  assign pop       = r_pop && !r_empty;
  assign rbin_next = rbin + (AW+1)'(pop);
  assign r_data    = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_next;
      rgray    <= bin2gray(rbin_next);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

  // a pop on an empty FIFO is a protocol error of the reader
  a_no_underflow: assert property (@(posedge rclk) disable iff (!rrst_n) r_pop |-> !r_empty)
    else $error("nc_fifo: pop while empty");
endmodule
