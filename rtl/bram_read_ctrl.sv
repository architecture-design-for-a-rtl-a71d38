// bram_read_ctrl: operation-management state machine of one reduction unit (the
// BRAM read control).
//
// Each incoming sample of the unit's time-multiplexed stream (s_valid, with its
// channel, 4-bit slot, time stamp and global channel ID) has already been
// written to the input BRAM by the unit. The controller reads the channel's
// status word and threshold and then, by the status:
//   00  no spike pending: x[n] and x[n-4] are read from the history and, with
//       the incoming x[n+4], sent to the NEO. In the detection phase an NEO above
//       the threshold is a spike: a 48-word block is taken from the spike
//       counter, the time stamp of x[n] and the channel ID go to its first two
//       words, and the status becomes 01 with the address of word 2.
//   01  the whole 16-sample history (10 pre-spike samples, the spike sample and
//       five after it, the last being the incoming one) is copied to the FIFO,
//       oldest first, one word per cycle; the status becomes 10.
//   10  the incoming sample (AP samples 17..30) is written to the FIFO and only
//       the low 4 address bits step; after offset 15 the upper 9 bits step and
//       the status becomes 11.
//   11  likewise for AP samples 31..46; after the last one the status returns to
//       00 and the block is committed to the FIFO's emptying process.
// After reset the unit counts sample rounds (a round ends with the sample of
// its last channel): 8 warm-up rounds fill the history and clear every status
// word, then 2^WIN_LOG2 training rounds accumulate |NEO| per channel into the
// threshold RAM, after which detection is enabled. The warm-up rounds and
// resetting the status words through them are this design's choice.
//
// Timing, counted from the s_valid cycle: an idle or refractory sample takes
// 2 cycles, a NEO test 5 (6 with a spike), the 16-sample copy 18 (the longest
// procedure). A unit receives one sample every NUM_UNITS (20) cycles, so the
// controller is always idle again in time; a sample arriving while busy is
// counted on overrun and not processed.
module bram_read_ctrl
  import nsd_pkg::*;
#(
  parameter int unsigned CH        = nsd_pkg::CH_PER_UNIT,
  parameter int unsigned WIN_LOG2  = nsd_pkg::MD_WIN_LOG2
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // sample of this unit
  input  logic                      s_valid,
  input  logic [SAMPLE_W-1:0]       s_data,
  input  logic [$clog2(CH)-1:0]     s_ch,
  input  logic [SLOT_W-1:0]         s_slot,
  input  logic [TS_W-1:0]           s_ts,
  input  logic [CHID_W-1:0]         s_chid,
  // input BRAM read port
  output logic                      ib_rd_en,
  output logic [$clog2(CH)-1:0]     ib_rd_ch,
  output logic [SLOT_W-1:0]         ib_rd_slot,
  input  logic [SAMPLE_W-1:0]       ib_rd_data,
  // channel status RAM (read at address s_ch)
  output logic                      st_rd_en,
  input  ch_status_t                st_rd_data,
  output logic                      st_wr_en,
  output logic [$clog2(CH)-1:0]     st_wr_ch,
  output ch_status_t                st_wr_data,
  // threshold RAM (read at address s_ch; its read data goes to threshold_logic,
  // whose thr_next output is the RAM's write data)
  output logic                      thr_rd_en,
  output logic                      thr_wr_en,
  output logic [$clog2(CH)-1:0]     thr_wr_ch,
  // NEO preprocessor (x[n-4] comes straight from the input BRAM read data)
  output logic                      neo_in_valid,
  output logic [SAMPLE_W-1:0]       neo_x_0,
  output logic [SAMPLE_W-1:0]       neo_x_p,
  input  logic                      neo_out_valid,
  // threshold logic
  output logic                      tl_detect,
  output logic                      tl_win_first,
  output logic                      tl_win_last,
  input  logic                      tl_spike,
  // spike counter / base ROM
  output logic                      alloc_req,
  input  logic                      alloc_ok,
  input  logic [FIFO_AW-1:0]        alloc_base,
  // output FIFO write side
  output logic                      fifo_wr_en,
  output logic [FIFO_AW-1:0]        fifo_wr_addr,
  output logic [SAMPLE_W-1:0]       fifo_wr_data,
  output logic                      fifo_commit,
  // status and events
  output phase_e                    phase,
  output logic                      busy,
  output logic                      ev_spike,     // spike detected and stored
  output logic                      ev_drop,      // spike detected, no free block
  output logic                      ev_overrun    // sample arrived while busy
);
  localparam int unsigned CW         = $clog2(CH);
  localparam int unsigned WARMUP     = 2 * NEO_DELTA;
  localparam int unsigned TRAIN_END  = WARMUP + (1 << WIN_LOG2);
  localparam int unsigned RW         = $clog2(TRAIN_END + 1);

  typedef enum logic [2:0] {S_IDLE, S_RD1, S_RD2, S_NEO, S_HDR, S_COPY} state_e;

  state_e               state_q;
  logic [CW-1:0]        ch_q;
  logic [SLOT_W-1:0]    slot_q;
  logic [SAMPLE_W-1:0]  data_q;
  logic [SAMPLE_W-1:0]  x0_q;
  logic [TS_W-1:0]      ts_q;
  logic [CHID_W-1:0]    chid_q;
  phase_e               ph_q;          // phase of the sample being processed
  logic                 first_q, last_q;
  logic [RW-1:0]        round_q;       // completed sample rounds, saturating
  logic [FIFO_AW-1:0]   addr_q;
  logic [SLOT_W:0]      rd_k_q;        // copy: reads issued
  logic [SLOT_W-1:0]    wr_k_q;        // copy: words written

  phase_e cur_phase;
  always_comb begin
    if (32'(round_q) < WARMUP)          cur_phase = PH_WARMUP;
    else if (32'(round_q) < TRAIN_END)  cur_phase = PH_TRAIN;
    else                                cur_phase = PH_DETECT;
  end
  assign phase = cur_phase;
  assign busy  = (state_q != S_IDLE);

  // status update of a refractory-period sample
  ch_status_t refr_next;
  logic       refr_done;
  always_comb begin
    refr_next = st_rd_data;
    refr_done = 1'b0;
    if (st_rd_data.addr[3:0] == 4'hF) begin
      refr_next.addr = {st_rd_data.addr[FIFO_AW-1:4] + 1'b1, 4'h0};
      if (st_rd_data.state == CH_REFR_A) begin
        refr_next.state = CH_REFR_B;
      end else begin
        refr_next.state = CH_IDLE;
        refr_done       = 1'b1;
      end
    end else begin
      refr_next.addr[3:0] = st_rd_data.addr[3:0] + 1'b1;
    end
  end

  always_comb begin
    ib_rd_en     = 1'b0;
    ib_rd_ch     = ch_q;
    ib_rd_slot   = '0;
    st_rd_en     = 1'b0;
    st_wr_en     = 1'b0;
    st_wr_ch     = ch_q;
    st_wr_data   = '{state: CH_IDLE, addr: '0};
    thr_rd_en    = 1'b0;
    thr_wr_en    = 1'b0;
    thr_wr_ch    = ch_q;
    neo_in_valid = 1'b0;
    neo_x_0      = x0_q;
    neo_x_p      = data_q;
    tl_detect    = (ph_q == PH_DETECT);
    tl_win_first = first_q;
    tl_win_last  = last_q;
    alloc_req    = 1'b0;
    fifo_wr_en   = 1'b0;
    fifo_wr_addr = addr_q;
    fifo_wr_data = data_q;
    fifo_commit  = 1'b0;
    ev_spike     = 1'b0;
    ev_drop      = 1'b0;
    ev_overrun   = s_valid && (state_q != S_IDLE);

    unique case (state_q)
      S_IDLE: if (s_valid) begin
        st_rd_en   = 1'b1;
        thr_rd_en  = 1'b1;
        ib_rd_en   = 1'b1;
        ib_rd_ch   = s_ch;
        ib_rd_slot = s_slot - SLOT_W'(NEO_DELTA);          // x[n]
      end
      S_RD1: begin
        if (ph_q == PH_WARMUP) begin
          st_wr_en = 1'b1;                                  // clear the status
        end else begin
          unique case (st_rd_data.state)
            CH_IDLE: begin
              ib_rd_en   = 1'b1;
              ib_rd_slot = slot_q - SLOT_W'(2 * NEO_DELTA);  // x[n-4]
            end
            CH_COPY16: begin
              ib_rd_en   = 1'b1;
              ib_rd_slot = slot_q + 1'b1;                    // oldest sample
            end
            CH_REFR_A, CH_REFR_B: begin
              fifo_wr_en   = 1'b1;
              fifo_wr_addr = st_rd_data.addr;
              st_wr_en     = 1'b1;
              st_wr_data   = refr_next;
              fifo_commit  = refr_done;
            end
            default: ;
          endcase
        end
      end
      S_RD2: neo_in_valid = 1'b1;
      S_NEO: if (neo_out_valid) begin
        if (ph_q == PH_TRAIN) begin
          thr_wr_en = 1'b1;
        end else if (tl_spike) begin
          alloc_req = 1'b1;
          if (alloc_ok) begin
            fifo_wr_en   = 1'b1;
            fifo_wr_addr = alloc_base;
            fifo_wr_data = ts_q - TS_W'(NEO_DELTA);          // time of x[n]
            st_wr_en     = 1'b1;
            st_wr_data   = '{state: CH_COPY16, addr: alloc_base + FIFO_AW'(2)};
            ev_spike     = 1'b1;
          end else begin
            ev_drop      = 1'b1;
          end
        end
      end
      S_HDR: begin
        fifo_wr_en   = 1'b1;
        fifo_wr_addr = addr_q + 1'b1;
        fifo_wr_data = SAMPLE_W'(chid_q);
      end
      S_COPY: begin
        if (32'(rd_k_q) < SLOTS) begin
          ib_rd_en   = 1'b1;
          ib_rd_slot = slot_q + SLOT_W'(rd_k_q) + 1'b1;
        end
        fifo_wr_en   = 1'b1;
        fifo_wr_addr = addr_q + FIFO_AW'(wr_k_q);
        fifo_wr_data = ib_rd_data;
        if (wr_k_q == SLOT_W'(SLOTS - 1)) begin
          st_wr_en   = 1'b1;
          st_wr_data = '{state: CH_REFR_A, addr: addr_q + FIFO_AW'(SLOTS)};
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      ch_q    <= '0;
      slot_q  <= '0;
      data_q  <= '0;
      x0_q    <= '0;
      ts_q    <= '0;
      chid_q  <= '0;
      ph_q    <= PH_WARMUP;
      first_q <= 1'b0;
      last_q  <= 1'b0;
      round_q <= '0;
      addr_q  <= '0;
      rd_k_q  <= '0;
      wr_k_q  <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (s_valid) begin
          ch_q    <= s_ch;
          slot_q  <= s_slot;
          data_q  <= s_data;
          ts_q    <= s_ts;
          chid_q  <= s_chid;
          ph_q    <= cur_phase;
          first_q <= (32'(round_q) == WARMUP);
          last_q  <= (32'(round_q) == TRAIN_END - 1);
          if (s_ch == CW'(CH - 1) && 32'(round_q) < TRAIN_END) round_q <= round_q + 1'b1;
          state_q <= S_RD1;
        end
        S_RD1: begin
          x0_q <= ib_rd_data;
          if (ph_q == PH_WARMUP) state_q <= S_IDLE;
          else begin
            unique case (st_rd_data.state)
              CH_IDLE:   state_q <= S_RD2;
              CH_COPY16: begin
                addr_q  <= st_rd_data.addr;
                rd_k_q  <= (SLOT_W+1)'(1);
                wr_k_q  <= '0;
                state_q <= S_COPY;
              end
              default:   state_q <= S_IDLE;
            endcase
          end
        end
        S_RD2: state_q <= S_NEO;
        S_NEO: if (neo_out_valid) begin
          addr_q  <= alloc_base;
          state_q <= (ph_q == PH_DETECT && tl_spike && alloc_ok) ? S_HDR : S_IDLE;
        end
        S_HDR: state_q <= S_IDLE;
        S_COPY: begin
          if (32'(rd_k_q) < SLOTS) rd_k_q <= rd_k_q + 1'b1;
          wr_k_q <= wr_k_q + 1'b1;
          if (wr_k_q == SLOT_W'(SLOTS - 1)) state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(s_valid && busy))
    else $error("sample arrived before the previous one was processed");
endmodule
