// nc_scatter: splits one input stream over the Nanocore array.
//
// Words arriving on the input stream are dealt out in bursts: cfg_burst
// words to core 0, the next cfg_burst words to core 1, and so on round-robin
// over the first cfg_ncores cores, so that each core receives its own burst
// of inputs (SIMD or MIMD use of the array). When the stream ends (s_last)
// part-way through a round, the unit pads: it keeps sending cfg_pad words
// until every active core has received a full burst, so the cores always see
// whole bursts. That the unit splits a stream over a configurable number of
// cores and pads incomplete rounds follows the document; burst-oriented
// round-robin order and the pad word are this design's choice. Config must
// be held stable while a stream is passing. All outputs share one data bus;
// only one core's valid is raised at a time. One word moves per cycle at most
// (valid/ready handshakes on both sides, no internal buffering, the input's
// ready is combinational from the selected core's ready).
// With cfg_replicate set the unit instead copies every input word to all
// active cores (stream replication, for kernels that each need the whole
// stream). Each core takes its copy as soon as it is ready; a record of
// which cores already have the word keeps a fast core from taking it twice,
// and the input word is accepted once every active core has it. Bursts and
// padding play no part in this mode. That the flow units replicate a stream
// follows the document; the fork with its per-core record is this design's.
module nc_scatter #(
  parameter int unsigned N_CORES = 8,
  parameter int unsigned DATA_W  = 64,
  localparam int unsigned CW     = (N_CORES > 1) ? $clog2(N_CORES) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [CW:0]        cfg_ncores,   // 1..N_CORES
  input  logic [15:0]        cfg_burst,    // words per core per round, >= 1
  input  logic [DATA_W-1:0]  cfg_pad,
  input  logic               cfg_replicate, // copy every word to all active cores
  input  logic               s_valid,
  output logic               s_ready,
  input  logic [DATA_W-1:0]  s_data,
  input  logic               s_last,
  output logic [N_CORES-1:0] m_valid,
  input  logic [N_CORES-1:0] m_ready,
  output logic [DATA_W-1:0]  m_data,
  output logic               padding     // high while pad words are sent
);
  logic [CW-1:0] idx, idx_next;
  logic [15:0]   cnt, cnt_next;
  logic          pad_q, xfer, round_end;
  logic [N_CORES-1:0] active, sent, took;

  assign round_end = (cnt == cfg_burst - 16'd1) && ((CW+1)'(idx) == cfg_ncores - 1'b1);
  assign padding   = pad_q;

  always_comb begin
    for (int i = 0; i < N_CORES; i++) active[i] = (CW+1)'(i) < cfg_ncores;
  end
  assign took = m_valid & m_ready;

  always_comb begin
    m_valid      = '0;
    m_valid[idx] = pad_q ? 1'b1 : s_valid;
    m_data       = pad_q ? cfg_pad : s_data;
    s_ready      = pad_q ? 1'b0 : m_ready[idx];
    xfer         = m_valid[idx] && m_ready[idx];
    cnt_next     = cnt + 16'd1;
    idx_next     = idx;
    if (cnt == cfg_burst - 16'd1) begin
      cnt_next = '0;
      idx_next = ((CW+1)'(idx) == cfg_ncores - 1'b1) ? '0 : idx + 1'b1;
    end
    if (cfg_replicate) begin
      m_valid = s_valid ? (active & ~sent) : '0;
      m_data  = s_data;
      s_ready = &(~active | sent | m_ready);
      xfer    = 1'b0;
    end
  end

  // replicate mode: cores that already hold the current word
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                sent <= '0;
    else if (!cfg_replicate || (s_valid && s_ready)) sent <= '0;
    else                                       sent <= sent | took;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= '0; cnt <= '0; pad_q <= 1'b0;
    end else if (xfer) begin
      idx <= idx_next;
      cnt <= cnt_next;
      if (pad_q) begin
        if (round_end) pad_q <= 1'b0;
      end else if (s_last && !round_end) begin
        pad_q <= 1'b1;
      end
    end
  end

  a_cfg_ncores: assert property (@(posedge clk) disable iff (!rst_n)
                                 cfg_ncores >= 1 && cfg_ncores <= (CW+1)'(N_CORES))
    else $error("nc_scatter: cfg_ncores out of range");
endmodule
