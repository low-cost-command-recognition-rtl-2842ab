// command_recognizer - spoken-command recogniser: spectrum, segmentation, DTW.
//
// The device turns a stream of 8 kHz speech samples into the index of one of
// a small set of trained commands, cheaply enough to sit next to a low-cost
// microcontroller.  The spectrum is computed in two steps.  The first N = 128
// samples (16 ms) go through a direct DFT (dft_engine); their coefficients
// are then copied (dft_result_transfer) into the sliding DFT (sdft_engine),
// which from then on refreshes all N bins after every sample at O(N) cost.
// Every refreshed spectrum, the first one included, becomes a vector of bin
// energies (bin_energy).  The spectral segmenter merges runs of similar
// vectors into averaged segment vectors of N+1 elements, dropping silence,
// which removes most of the parameters a classifier would otherwise see.
// The segment vectors of one utterance form the query of the DTW classifier,
// which compares it with the stored prototypes and reports the closest.
//
// The chain of stages and their order follow the description of the device;
// the stream handshakes between the stages, the classify strobe that ends an
// utterance, the resync input and all port formats are choices of this
// design.  The microphone/ADC, the microcontroller and the radio transmitter
// sit outside: the sample port, the threshold/prototype/classify inputs and
// the result outputs are where they connect.
//
// Interface and timing:
//   s_valid/s_ready/s_data   DATA_READY / DATA_REQ / x(n).  During the direct
//                      DFT a sample is taken every N+1 clocks at most; in
//                      the sliding phase every N+1 clocks unless the later
//                      stages hold the spectrum stream back.
//   resync             restart with a fresh direct DFT on the next N samples.
//   dft_done           high while the direct DFT holds a finished result.
//   sliding            high once the sliding DFT has been seeded.
//   spec_*             every spectrum bin as it passes into the energy stage.
//   contrast_thr, silence_thr  segmentation thresholds (squared contrast;
//                      mean vector energy).
//   seg_*              segment elements as the classifier takes them.
//   t_*                prototype load port of the classifier.
//   classify           end of utterance: classify the collected segments.
//   r_*                classification result (one-clock r_valid).
module command_recognizer #(
  parameter int unsigned N        = cr_pkg::N_DFT,
  parameter int unsigned SAMPLE_W = cr_pkg::SAMPLE_W,
  parameter int unsigned TW_W     = cr_pkg::TW_W,
  parameter int unsigned COEF_W   = cr_pkg::COEF_W,
  parameter int unsigned CNT_W    = 16,
  parameter int unsigned MAX_SEQ  = 32,
  parameter int unsigned NUM_CMD  = 20,
  localparam int unsigned AW      = $clog2(N),
  localparam int unsigned ELEM_W  = 2 * COEF_W,
  localparam int unsigned DIM     = N + 1,
  localparam int unsigned IW      = $clog2(N + 1),
  localparam int unsigned DIST_W  = 2 * ELEM_W + 2 + $clog2(N),
  localparam int unsigned EN_W    = ELEM_W + $clog2(N),
  localparam int unsigned EW      = $clog2(DIM),
  localparam int unsigned SW      = $clog2(MAX_SEQ + 1),
  localparam int unsigned CW      = $clog2(NUM_CMD),
  localparam int unsigned COST_W  = ELEM_W + EW + $clog2(2 * MAX_SEQ) + 1
) (
  input  logic                       clk,
  input  logic                       rst,
  // samples
  input  logic                       s_valid,
  output logic                       s_ready,
  input  logic signed [SAMPLE_W-1:0] s_data,
  input  logic                       resync,
  output logic                       dft_done,
  output logic                       sliding,
  // spectrum
  output logic                       spec_valid,
  output logic [AW-1:0]              spec_k,
  output logic signed [COEF_W-1:0]   spec_re,
  output logic signed [COEF_W-1:0]   spec_im,
  // segmentation
  input  logic [DIST_W-1:0]          contrast_thr,
  input  logic [EN_W-1:0]            silence_thr,
  output logic                       seg_valid,
  output logic [ELEM_W-1:0]          seg_data,
  output logic [IW-1:0]              seg_idx,
  output logic                       seg_last,
  output logic                       seg_boundary,
  output logic                       seg_silence_drop,
  // prototypes
  input  logic                       t_we,
  input  logic [CW-1:0]              t_cmd,
  input  logic [SW-1:0]              t_vec,
  input  logic [EW-1:0]              t_elem,
  input  logic [ELEM_W-1:0]          t_data,
  input  logic                       t_len_we,
  input  logic [SW-1:0]              t_len,
  // classification
  input  logic                       classify,
  output logic                       cls_busy,
  output logic                       q_overflow,
  output logic                       r_valid,
  output logic                       r_found,
  output logic [CW-1:0]              r_cmd,
  output logic [COST_W-1:0]          r_cost
);

  // ---------------------------------------------------------------- phase
  logic phase_run;       // 0: direct DFT on the first N samples, 1: sliding

  // direct DFT
  logic                     dft_s_valid, dft_s_ready, read_sig;
  logic [AW-1:0]            rd_k;
  logic signed [COEF_W-1:0] rd_re, rd_im;
  // transfer
  logic                     tr_valid, tr_last, tr_busy;
  logic [AW-1:0]            tr_k;
  logic signed [COEF_W-1:0] tr_re, tr_im;
  // sliding DFT
  logic                     sd_s_valid, sd_s_ready;
  logic                     sd_valid, sd_ready, sd_last;
  logic [AW-1:0]            sd_k;
  logic signed [COEF_W-1:0] sd_re, sd_im;
  // energy
  logic                     en_i_valid, en_i_ready, en_i_last;
  logic [AW-1:0]            en_i_k;
  logic signed [COEF_W-1:0] en_i_re, en_i_im;
  logic                     en_valid, en_ready, en_last;
  logic [AW-1:0]            en_k;
  logic [ELEM_W-1:0]        en_data;
  // segments
  logic                     sg_valid, sg_ready, sg_last;
  logic [ELEM_W-1:0]        sg_data;
  logic [IW-1:0]            sg_idx;

  always_ff @(posedge clk) begin
    if (rst || resync)            phase_run <= 1'b0;
    else if (tr_valid && tr_last) phase_run <= 1'b1;
  end
  assign sliding = phase_run;

  // Samples: in the first phase the direct DFT and the sliding DFT's sample
  // buffer take each sample together; afterwards only the sliding DFT.
  always_comb begin
    if (!phase_run) s_ready = dft_s_ready && sd_s_ready && !tr_busy;
    else            s_ready = sd_s_ready;
  end
  assign dft_s_valid = s_valid && s_ready && !phase_run;
  assign sd_s_valid  = s_valid && s_ready;

  dft_engine #(.N(N), .SAMPLE_W(SAMPLE_W), .TW_W(TW_W), .COEF_W(COEF_W)) u_dft (
    .clk, .rst,
    .s_valid(dft_s_valid), .s_ready(dft_s_ready), .s_data,
    .read_sig, .done(dft_done), .restart(resync),
    .rd_k, .rd_re, .rd_im
  );

  dft_result_transfer #(.N(N), .COEF_W(COEF_W)) u_xfer (
    .clk, .rst, .read_sig, .rd_k, .rd_re, .rd_im,
    .o_valid(tr_valid), .o_k(tr_k), .o_re(tr_re), .o_im(tr_im), .o_last(tr_last),
    .busy(tr_busy)
  );

  sdft_engine #(.N(N), .SAMPLE_W(SAMPLE_W), .TW_W(TW_W), .COEF_W(COEF_W)) u_sdft (
    .clk, .rst,
    .seed_valid(tr_valid), .seed_k(tr_k), .seed_re(tr_re), .seed_im(tr_im),
    .run(phase_run),
    .s_valid(sd_s_valid), .s_ready(sd_s_ready), .s_data,
    .o_valid(sd_valid), .o_ready(sd_ready), .o_k(sd_k), .o_re(sd_re), .o_im(sd_im),
    .o_last(sd_last)
  );

  // The energy stage sees the direct DFT's spectrum while it is transferred,
  // then every sliding-DFT spectrum.
  always_comb begin
    if (tr_valid) begin
      en_i_valid = 1'b1;
      en_i_k     = tr_k;
      en_i_re    = tr_re;
      en_i_im    = tr_im;
      en_i_last  = tr_last;
    end else begin
      en_i_valid = sd_valid;
      en_i_k     = sd_k;
      en_i_re    = sd_re;
      en_i_im    = sd_im;
      en_i_last  = sd_last;
    end
  end
  assign sd_ready = en_i_ready && !tr_valid;

  assign spec_valid = en_i_valid && en_i_ready;
  assign spec_k     = en_i_k;
  assign spec_re    = en_i_re;
  assign spec_im    = en_i_im;

  bin_energy #(.N(N), .COEF_W(COEF_W)) u_energy (
    .clk, .rst,
    .i_valid(en_i_valid), .i_ready(en_i_ready), .i_k(en_i_k), .i_re(en_i_re),
    .i_im(en_i_im), .i_last(en_i_last),
    .e_valid(en_valid), .e_ready(en_ready), .e_k(en_k), .e_data(en_data),
    .e_last(en_last)
  );

  spectral_segmenter #(.VEC_LEN(N), .ELEM_W(ELEM_W), .CNT_W(CNT_W)) u_seg (
    .clk, .rst, .contrast_thr, .silence_thr,
    .i_valid(en_valid), .i_ready(en_ready), .i_data(en_data), .i_last(en_last),
    .o_valid(sg_valid), .o_ready(sg_ready), .o_data(sg_data), .o_idx(sg_idx),
    .o_last(sg_last), .boundary(seg_boundary), .silence_drop(seg_silence_drop)
  );

  dtw_classifier #(.DIM(DIM), .ELEM_W(ELEM_W), .MAX_SEQ(MAX_SEQ), .NUM_CMD(NUM_CMD)) u_dtw (
    .clk, .rst,
    .q_valid(sg_valid), .q_ready(sg_ready), .q_data(sg_data), .q_last(sg_last),
    .q_overflow,
    .t_we, .t_cmd, .t_vec, .t_elem, .t_data, .t_len_we, .t_len,
    .classify, .busy(cls_busy),
    .r_valid, .r_found, .r_cmd, .r_cost
  );

  assign seg_valid = sg_valid && sg_ready;
  assign seg_data  = sg_data;
  assign seg_idx   = sg_idx;
  assign seg_last  = sg_last;

  // The transfer has no back-pressure: the energy stage must take each word.
  a_xfer_taken: assert property (@(posedge clk) disable iff (rst) tr_valid |-> en_i_ready);

endmodule
