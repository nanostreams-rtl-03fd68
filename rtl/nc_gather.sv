// nc_gather: joins the result streams of the Nanocore array into one.
//
// The unit takes cfg_burst result words from core 0, then cfg_burst from
// core 1, and so on round-robin over the first cfg_ncores cores, the same
// order in which nc_scatter dealt out the inputs. It forwards the first
// cfg_total words of a batch on its output and marks the last with m_last;
// any further words of the final round are results of pad inputs and are
// taken from the cores and dropped. When the round that completes the batch
// ends, batch_done pulses for one cycle and the unit starts the next batch.
// Joining the outputs and handling padding follows the document; the
// ordering, the drop of pad results and the total-count register are this
// design's choice. One word moves per cycle at most; the selected core's
// ready is combinational from the output's ready.
module nc_gather #(
  parameter int unsigned N_CORES = 8,
  parameter int unsigned DATA_W  = 64,
  localparam int unsigned CW     = (N_CORES > 1) ? $clog2(N_CORES) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [CW:0]        cfg_ncores,   // 1..N_CORES
  input  logic [15:0]        cfg_burst,    // words per core per round, >= 1
  input  logic [31:0]        cfg_total,    // words forwarded per batch, >= 1
  input  logic [N_CORES-1:0] s_valid,
  output logic [N_CORES-1:0] s_ready,
  input  logic [DATA_W-1:0]  s_data [N_CORES],
  output logic               m_valid,
  input  logic               m_ready,
  output logic [DATA_W-1:0]  m_data,
  output logic               m_last,
  output logic               dropping,     // current word is a pad result
  output logic               batch_done
);
  logic [CW-1:0] idx;
  logic [15:0]   cnt;
  logic [31:0]   sent;
  logic          take, burst_end, round_end;

  assign dropping  = (sent >= cfg_total);
  assign burst_end = (cnt == cfg_burst - 16'd1);
  assign round_end = burst_end && ((CW+1)'(idx) == cfg_ncores - 1'b1);

  always_comb begin
    s_ready      = '0;
    s_ready[idx] = dropping ? 1'b1 : m_ready;
    m_valid      = s_valid[idx] && !dropping;
    m_data       = s_data[idx];
    m_last       = (sent == cfg_total - 32'd1);
    take         = s_valid[idx] && s_ready[idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= '0; cnt <= '0; sent <= '0; batch_done <= 1'b0;
    end else begin
      batch_done <= 1'b0;
      if (take) begin
        cnt <= burst_end ? '0 : cnt + 16'd1;
        if (burst_end) idx <= ((CW+1)'(idx) == cfg_ncores - 1'b1) ? '0 : idx + 1'b1;
        if (round_end && (dropping || m_last)) begin
          sent       <= '0;
          batch_done <= 1'b1;
        end else if (!dropping) begin
          sent <= sent + 32'd1;
        end
      end
    end
  end
endmodule
