// ht_core: the Hough-transform track finder (the "HT firmware" between
// FIRST_FIFO and SECOND_FIFO).
//
// An event arrives as a stream of 256-bit words: a start word, words with up
// to eight clusters (one per layer), and an end word (see input_bit_mapper).
// Processing runs in phases controlled by a small state machine:
//   IDLE   wait for a start word; on it clear accumulator and cluster store.
//   FILL   per cluster word: register 1/r of the eight clusters (one divider
//          per layer), then fill the accumulator (all phi0 bins of all eight
//          lines in one clock) and append the clusters to the store.
//   DRAIN  one clock for the last fill to land after the end word.
//   SEARCH capture the five-bin road map of the whole accumulator.
//   LOAD   take up to N_LANES roads, one per clock, each emitting a road
//          header word; with none left go to END.
//   SCAN   back-search of the batch over the stored clusters, emitting one
//          cluster word per beat with a hit; then LOAD the next batch.
//   END    emit the end-of-event word with the number of roads.
// in_ready is high only in IDLE and FILL and drops as soon as an end word is
// seen at the input or in the mapper, so the word after an end word stays in
// FIRST_FIFO until the event is finished; ht_valid is high while an event is
// being received (FILL).
//
// Output: out_valid/out_word with a valid/ready handshake (a word moves on a
// clock edge with both high). Word formats, tag in bits 255:252:
//   road header  4'hA, lane in 47:32, phi0 bin in 31:16, qA/pT bin in 15:0
//   clusters     4'hC, lane k in bits 15k+14:15k as {layer[2:0], index[11:0]},
//                7FFF where lane k has no cluster in this beat
//   event end    4'hE, store overflow in bit 16, number of roads in 15:0
// road_on shows the lanes that hold a road of the current batch and
// cl_data_out the 18-bit lane words of the back-search.
//
// From the source design: the phase order (fill, road search, back-search,
// output), eight clusters in per clock, up to 16 roads out in parallel, the
// start/valid/end framing and the road_on and HT_outdata_valid signals. The
// output word formats, the state machine and the handshakes are this
// design's own.
module ht_core
  import ht_pkg::*;
#(
  parameter int unsigned N_PHI0      = 1200,
  parameter int unsigned N_QPT       = 64,
  parameter int unsigned PHI0_BIN_W  = 32,
  parameter int unsigned PHI0_OFFSET = 13568,
  parameter int unsigned QPT_SHIFT   = 18,
  parameter int unsigned N_LANES     = 16,
  parameter int unsigned MAX_CL      = 512,
  parameter int unsigned TH_C        = 8,
  parameter int unsigned TH_1        = 7,
  parameter int unsigned TH_2        = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // input words from FIRST_FIFO
  input  logic                 in_valid,
  input  logic [WORD_W-1:0]    in_word,
  output logic                 in_ready,
  output logic                 ht_valid,
  // output words towards SECOND_FIFO
  output logic                 out_valid,
  output logic [WORD_W-1:0]    out_word,
  input  logic                 out_ready,
  // observation
  output logic [N_LANES-1:0]   road_on,
  output logic [CL_OUT_W-1:0]  cl_data_out [N_LANES],
  output logic                 busy
);
  localparam int unsigned PW = $clog2(N_PHI0);
  localparam int unsigned QW = $clog2(N_QPT);
  localparam int unsigned IW = $clog2(MAX_CL);
  localparam int unsigned LW = $clog2(N_LANES + 1);
  localparam int unsigned KW = $clog2(N_LANES);
  localparam int unsigned END_BIT   = 223;
  localparam int unsigned VALID_BIT = 240;

  typedef enum logic [2:0] {S_IDLE, S_FILL, S_DRAIN, S_SEARCH, S_LOAD, S_SCAN, S_END} state_t;
  state_t state;

  // ---------------- input mapping ----------------
  logic                m_start, m_end, m_valid;
  logic [N_LAYERS-1:0] m_hit;
  cluster_t            m_cl [N_LAYERS];

  input_bit_mapper u_map (
    .clk, .rst_n, .in_valid, .in_word,
    .event_start(m_start), .event_end(m_end), .event_valid(m_valid),
    .hit(m_hit), .cl(m_cl)
  );

  assign in_ready = (state == S_IDLE || state == S_FILL) && !m_end &&
                    !(in_valid && in_word[END_BIT] && !in_word[VALID_BIT]);
  assign ht_valid = (state == S_FILL);

  // ---------------- reciprocal stage ----------------
  logic                f_fill;
  logic [N_LAYERS-1:0] f_hit;
  phi_t                f_phi   [N_LAYERS];
  inv_r_t              f_inv   [N_LAYERS];
  hcluster_t           f_hcl   [N_LAYERS];
  logic                clear_ev;

  assign clear_ev = m_start && (state == S_IDLE || state == S_FILL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_fill <= 1'b0;
      f_hit  <= '0;
      for (int l = 0; l < N_LAYERS; l++) begin
        f_phi[l] <= '0;
        f_inv[l] <= '0;
      end
    end else begin
      f_fill <= m_valid && (state == S_FILL);
      f_hit  <= m_hit;
      for (int l = 0; l < N_LAYERS; l++) begin
        f_phi[l] <= m_cl[l].phi;
        f_inv[l] <= reciprocal(m_cl[l].r);
      end
    end
  end

  always_comb
    for (int l = 0; l < N_LAYERS; l++) f_hcl[l] = '{inv_r: f_inv[l], phi: f_phi[l]};

  // ---------------- accumulator and cluster store ----------------
  logic [N_QPT-1:0]    layer_bits [N_PHI0][N_LAYERS];

  ht_accumulator #(
    .N_PHI0(N_PHI0), .N_QPT(N_QPT), .PHI0_BIN_W(PHI0_BIN_W),
    .PHI0_OFFSET(PHI0_OFFSET), .QPT_SHIFT(QPT_SHIFT)
  ) u_acc (
    .clk, .rst_n, .clear(clear_ev), .fill(f_fill), .hit(f_hit),
    .phi(f_phi), .inv_r(f_inv), .layer_bits
  );

  logic [2:0]    st_rd_layer;
  logic [IW-1:0] st_rd_index;
  hcluster_t     st_rd_data;
  logic [IW:0]   st_count [N_LAYERS];
  logic          st_overflow;

  ht_cluster_store #(.MAX_CL(MAX_CL)) u_store (
    .clk, .rst_n, .clear(clear_ev), .wr_en(f_fill), .hit(f_hit), .wr_data(f_hcl),
    .rd_layer(st_rd_layer), .rd_index(st_rd_index), .rd_data(st_rd_data),
    .count(st_count), .overflow(st_overflow)
  );

  // ---------------- road finder ----------------
  logic          rf_search, rf_pop, rf_valid;
  logic [PW-1:0] rf_phi0;
  logic [QW-1:0] rf_qpt;

  ht_road_finder #(
    .N_PHI0(N_PHI0), .N_QPT(N_QPT), .TH_C(TH_C), .TH_1(TH_1), .TH_2(TH_2)
  ) u_roads (
    .clk, .rst_n, .layer_bits, .search(rf_search), .pop(rf_pop),
    .road_valid(rf_valid), .road_phi0(rf_phi0), .road_qpt(rf_qpt)
  );

  // ---------------- back-search ----------------
  logic [N_LANES-1:0] lane_on;
  logic [PW-1:0]      lane_phi0 [N_LANES];
  logic [QW-1:0]      lane_qpt  [N_LANES];
  logic               bs_start, bs_valid, bs_ready, bs_busy, bs_done;

  ht_back_search #(
    .N_PHI0(N_PHI0), .N_QPT(N_QPT), .PHI0_BIN_W(PHI0_BIN_W), .PHI0_OFFSET(PHI0_OFFSET),
    .QPT_SHIFT(QPT_SHIFT), .N_LANES(N_LANES), .MAX_CL(MAX_CL)
  ) u_bs (
    .clk, .rst_n, .start(bs_start), .lane_on, .road_phi0(lane_phi0), .road_qpt(lane_qpt),
    .count(st_count), .rd_layer(st_rd_layer), .rd_index(st_rd_index), .rd_data(st_rd_data),
    .out_valid(bs_valid), .out_ready(bs_ready), .lane_word(cl_data_out),
    .busy(bs_busy), .done(bs_done)
  );

  assign road_on = lane_on;

  // ---------------- control ----------------
  logic          can_out;
  logic [LW-1:0] n_loaded;
  logic [15:0]   n_roads;

  assign can_out   = !out_valid || out_ready;
  assign rf_search = (state == S_SEARCH);
  assign rf_pop    = (state == S_LOAD) && can_out && rf_valid && (n_loaded < LW'(N_LANES));
  assign bs_start  = (state == S_LOAD) && !rf_pop && (n_loaded != '0) && !bs_busy;
  assign bs_ready  = (state == S_SCAN) && can_out;
  assign busy      = (state != S_IDLE);

  function automatic logic [WORD_W-1:0] cluster_word(input logic [CL_OUT_W-1:0] w [N_LANES]);
    logic [WORD_W-1:0] o;
    o = '0;
    o[255:252] = TAG_CLUSTER;
    for (int k = 0; k < N_LANES; k++)
      o[LANE_FIELD_W*k +: LANE_FIELD_W] = (w[k] == CL_NONE) ? '1 : {w[k][17:15], w[k][11:0]};
    return o;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      out_valid <= 1'b0;
      out_word  <= '0;
      lane_on   <= '0;
      n_loaded  <= '0;
      n_roads   <= '0;
      for (int k = 0; k < N_LANES; k++) begin
        lane_phi0[k] <= '0;
        lane_qpt[k]  <= '0;
      end
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (m_start) state <= S_FILL;
        S_FILL: if (m_end) state <= S_DRAIN;
        S_DRAIN: state <= S_SEARCH;
        S_SEARCH: begin
          n_loaded <= '0;
          n_roads  <= '0;
          lane_on  <= '0;
          state    <= S_LOAD;
        end
        S_LOAD: begin
          if (rf_pop) begin
            lane_on[n_loaded[KW-1:0]]   <= 1'b1;
            lane_phi0[n_loaded[KW-1:0]] <= rf_phi0;
            lane_qpt[n_loaded[KW-1:0]]  <= rf_qpt;
            n_loaded            <= n_loaded + 1'b1;
            n_roads             <= n_roads + 1'b1;
            out_valid           <= 1'b1;
            out_word            <= {TAG_ROAD, 204'b0, 16'(n_loaded), 16'(rf_phi0), 16'(rf_qpt)};
          end else if (bs_start) begin
            state <= S_SCAN;
          end else if (n_loaded == '0) begin
            state <= S_END;
          end
        end
        S_SCAN: begin
          if (bs_valid && bs_ready) begin
            out_valid <= 1'b1;
            out_word  <= cluster_word(cl_data_out);
          end
          if (bs_done) begin
            lane_on  <= '0;
            n_loaded <= '0;
            state    <= S_LOAD;
          end
        end
        S_END: begin
          if (can_out) begin
            out_valid <= 1'b1;
            out_word  <= {TAG_EVENT, 235'b0, st_overflow, n_roads};
            state     <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The 256-bit cluster word has room for 16 lanes of 15 bits.
  initial if (N_LANES > 16) $error("ht_core: at most 16 lanes fit an output word");
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               out_valid && !out_ready |=> out_valid && $stable(out_word))
    else $error("ht_core: output word changed while stalled");
endmodule
