// spike_aligner: cuts out each detected spike, aligned on its peak.
//
// The document aligns spikes on their peak before feature extraction; the
// buffer, the search window and the window length are this design's choices.
// Every sample is written into a circular history buffer of 2**BUF_LOG words.
// When the detector reports a spike (det) the aligner notes the newest buffer
// address, waits until SEARCH_FWD + N_WIN - 1 - PRE further samples are stored,
// then scans SEARCH_BACK + SEARCH_FWD + 1 samples around the detection, one per
// clk cycle, for the largest |x|. The N_WIN samples from peak - PRE to
// peak + N_WIN - 1 - PRE are then streamed out, one per out_en pulse, with the
// peak at position PRE. Detections that arrive while a spike is being handled
// are ignored (a refractory period).
//
// Interface: x is written on sample_en; det is a one-cycle pulse; the output
// stream is sp_valid / sp_sample with sp_first and sp_last marking the window
// ends. busy is high from detection to the last output sample.
module spike_aligner
  import ss_pkg::*;
#(
  parameter int unsigned BUF_LOG     = 6,
  parameter int unsigned N_WIN       = 32,
  parameter int unsigned PRE         = 8,
  parameter int unsigned SEARCH_BACK = 12,
  parameter int unsigned SEARCH_FWD  = 3
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    sample_en,
  input  sample_t x,
  input  logic    det,
  input  logic    out_en,
  output logic    sp_valid,
  output sample_t sp_sample,
  output logic    sp_first,
  output logic    sp_last,
  output logic    busy
);
  localparam int unsigned DEPTH  = 1 << BUF_LOG;
  localparam int unsigned POST   = N_WIN - 1 - PRE;
  localparam int unsigned WAIT_N = SEARCH_FWD + POST;
  localparam int unsigned SPAN   = SEARCH_BACK + SEARCH_FWD + 1;
  localparam int unsigned CNT_W  = $clog2(WAIT_N + N_WIN + SPAN + 1);

  typedef logic [BUF_LOG-1:0] addr_t;
  typedef enum logic [1:0] {A_IDLE, A_WAIT, A_SEARCH, A_STREAM} state_e;

  sample_t             buffer [DEPTH];
  addr_t               wp, det_addr, scan_addr, peak_addr, rd_addr;
  state_e              state;
  logic [CNT_W-1:0]    cnt;
  logic [SAMPLE_W-1:0] peak_abs, cand_abs;
  sample_t             cand;

  always_comb begin
    cand     = buffer[scan_addr];
    cand_abs = cand[SAMPLE_W-1] ? SAMPLE_W'(-cand) : SAMPLE_W'(cand);
  end

  always_ff @(posedge clk) begin
    if (sample_en) buffer[wp] <= x;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp        <= '0;
      det_addr  <= '0;
      scan_addr <= '0;
      peak_addr <= '0;
      rd_addr   <= '0;
      peak_abs  <= '0;
      cnt       <= '0;
      state     <= A_IDLE;
      sp_valid  <= 1'b0;
      sp_sample <= '0;
      sp_first  <= 1'b0;
      sp_last   <= 1'b0;
    end else begin
      if (sample_en) wp <= wp + 1'b1;
      sp_valid <= 1'b0;
      sp_first <= 1'b0;
      sp_last  <= 1'b0;
      unique case (state)
        A_IDLE: if (det) begin
          det_addr <= wp - 1'b1;
          cnt      <= '0;
          state    <= A_WAIT;
        end
        A_WAIT: if (sample_en) begin
          cnt <= cnt + 1'b1;
          if (cnt == CNT_W'(WAIT_N - 1)) begin
            scan_addr <= det_addr - addr_t'(SEARCH_BACK);
            peak_abs  <= '0;
            cnt       <= '0;
            state     <= A_SEARCH;
          end
        end
        A_SEARCH: begin
          if (cnt == '0 || cand_abs > peak_abs) begin
            peak_abs  <= cand_abs;
            peak_addr <= scan_addr;
          end
          scan_addr <= scan_addr + 1'b1;
          cnt       <= cnt + 1'b1;
          if (cnt == CNT_W'(SPAN - 1)) begin
            cnt   <= '0;
            state <= A_STREAM;
          end
        end
        A_STREAM: begin
          if (cnt == '0) rd_addr <= peak_addr - addr_t'(PRE);
          if (out_en && cnt != '0) begin
            sp_valid  <= 1'b1;
            sp_sample <= buffer[rd_addr];
            sp_first  <= cnt == CNT_W'(1);
            sp_last   <= cnt == CNT_W'(N_WIN);
            rd_addr   <= rd_addr + 1'b1;
            cnt       <= cnt + 1'b1;
            if (cnt == CNT_W'(N_WIN)) state <= A_IDLE;
          end else if (cnt == '0) begin
            cnt <= CNT_W'(1);
          end
        end
        default: state <= A_IDLE;
      endcase
    end
  end

  assign busy = state != A_IDLE;

  initial begin
    assert (SEARCH_BACK + PRE + WAIT_N + N_WIN / 2 < DEPTH)
      else $error("history buffer too small for the alignment window");
  end
endmodule
