// Ternary neural network accelerator running the hybrid 2D CNN / 1D TCN.
//
// The accelerator executes a network layer by layer out of its own memories,
// started by start_i (a register write or the DVS interface's data-ready
// interrupt) and signalling the end with a one-cycle done_o (its interrupt).
// Every cycle of the compute phase produces one complete output pixel: N_CH
// output channel compute units (cutie_ocu) each evaluate a full kernel window
// over all N_CH input channels and threshold the result. Per layer:
//   2D layer (3x3, same or valid padding, optional 2x2 max pooling): input
//     lines are loaded once into the 3-line buffer, one pixel per cycle, and
//     the windows of each output line are dispatched from there. The single
//     1x1 output vector of the last 2D layer is pushed into the TCN buffer.
//   1D layer (kernel size k, dilation d, causal same or valid padding): the
//     input sequence (from the TCN buffer for the first TCN layer, from the
//     activation memory otherwise) is loaded into one line and the taps at
//     t, t-d, .., t-(k-1)d are dispatched.
//   Last layer: the pre-activations of the first N_CLASSES channels are the
//     class scores; class_o is the index of the largest one (lowest index on
//     a tie).
// Activations alternate between two banks (cutie_act_mem). The input feature
// map is written into bank 0 through the 32-bit activation port (16 two-bit
// channels per pixel, the frame-buffer word format) while the accelerator is
// idle; act_ready_o is low while it runs.
// The fully unrolled OCUs, per-OCU weight buffers, the 3-line buffer, the TCN
// buffer of 24 vectors, 96 channels, causal dilated 1D kernels and the
// interrupt-driven start follow the documented accelerator. The layer
// sequencing, memory organisation, configuration ports (one full kernel per
// write) and the mapping of 1D kernels onto the window taps are this
// design's choices; a final 1D layer is limited to 9 taps.
//
// Timing of a layer: for every input line W+1 load cycles, for every output
// pixel one cycle, plus 3 cycles to drain the pipeline.
module cutie
  import cutie_pkg::*;
#(
  parameter int unsigned N_CH      = 96,
  parameter int unsigned W_MAX     = 64,
  parameter int unsigned N_LAYERS  = 9,
  parameter int unsigned TCN_DEPTH = 24,
  parameter int unsigned N_CLASSES = 11,
  parameter int unsigned ZW        = 12,
  localparam int unsigned LW = $clog2(N_LAYERS),
  localparam int unsigned OW = $clog2(N_CH),
  localparam int unsigned AW = $clog2(W_MAX * W_MAX),
  localparam int unsigned CW = $clog2(N_CLASSES)
) (
  input  logic                          clk_i,
  input  logic                          rst_ni,
  // weight / threshold load: one OCU, one layer per write
  input  logic                          wt_we_i,
  input  logic [LW-1:0]                 wt_layer_i,
  input  logic [OW-1:0]                 wt_ocu_i,
  input  tern_t [TAPS-1:0][N_CH-1:0]    wt_w_i,
  input  logic signed [ZW-1:0]          wt_tlo_i,
  input  logic signed [ZW-1:0]          wt_thi_i,
  // layer configuration
  input  logic                          cfg_we_i,
  input  logic [LW-1:0]                 cfg_layer_i,
  input  layer_cfg_t                    cfg_data_i,
  // input activations (bank 0), 16 channels per 32-bit word
  input  logic                          act_we_i,
  input  logic [AW-1:0]                 act_addr_i,
  input  logic [31:0]                   act_wdata_i,
  output logic                          act_ready_o,
  // control
  input  logic                          start_i,
  output logic                          busy_o,
  output logic                          done_o,
  output logic signed [ZW-1:0]          scores_o [N_CLASSES],
  output logic [CW-1:0]                 class_o
);

  typedef enum logic [2:0] {S_IDLE, S_LSTART, S_PREP, S_LOAD, S_COMP, S_DRAIN, S_FIN} state_e;
  state_e state_q;

  layer_cfg_t cfg_mem [N_LAYERS];
  layer_cfg_t cfg;

  logic [LW-1:0] layer_q;
  logic          cur_q;          // bank holding the current layer's input
  logic [7:0]    oy_q, ox_q, next_load_q, load_col_q;
  logic          pend_valid_q;
  logic [7:0]    pend_col_q;
  logic [1:0]    pend_slot_q;
  logic [1:0]    drain_q;

  always_ff @(posedge clk_i) begin
    if (cfg_we_i) cfg_mem[cfg_layer_i] <= cfg_data_i;
  end
  assign cfg = cfg_mem[layer_q];

  // ---------------- layer geometry ----------------
  logic [7:0] w_in, h_in, w_out, h_out, need_row, k_span;

  assign k_span = (8'(cfg.ksize) - 8'd1) * 8'(cfg.dil);
  assign w_in   = {1'b0, cfg.in_w};
  assign h_in   = cfg.is_1d ? 8'd1 : w_in;
  always_comb begin
    if (cfg.is_1d) w_out = cfg.pad_same ? w_in : w_in - k_span;
    else           w_out = cfg.pad_same ? w_in : w_in - 8'd2;
  end
  assign h_out    = cfg.is_1d ? 8'd1 : w_out;
  assign need_row = cfg.is_1d ? 8'd0 : (cfg.pad_same ? oy_q + 8'd1 : oy_q + 8'd2);

  // ---------------- memories and buffers ----------------
  tern_t [N_CH-1:0] bank_rdata [2];
  logic             bank_we    [2];
  logic [AW-1:0]    bank_waddr [2];
  tern_t [N_CH-1:0] bank_wdata [2];
  logic [N_CH-1:0]  bank_wmask [2];
  logic             bank_re    [2];
  logic [AW-1:0]    rd_addr;

  tern_t [N_CH-1:0] tcn_rdata, tcn_q;
  tern_t [N_CH-1:0] lb_wdata;
  tern_t [TAPS-1:0][N_CH-1:0] win;

  logic             pool_valid;
  logic [7:0]       pool_x, pool_y;
  tern_t [N_CH-1:0] pool_data;

  tern_t [N_CH-1:0] ext_word;
  logic  [N_CH-1:0] ext_mask;
  always_comb begin
    ext_word = '0;
    ext_mask = '1;
    for (int c = 0; c < 16 && c < int'(N_CH); c++) ext_word[c] = act_wdata_i[2*c +: 2];
  end

  logic loading;
  assign loading = (state_q == S_LOAD) && (load_col_q < w_in);
  assign rd_addr = AW'(next_load_q) * AW'(W_MAX) + AW'(load_col_q);

  logic out_to_bank;
  assign out_to_bank = pool_valid && !cfg.to_tcn;

  for (genvar b = 0; b < 2; b++) begin : g_bank
    always_comb begin
      if (b == 0 && state_q == S_IDLE) begin
        bank_we[b]    = act_we_i;
        bank_waddr[b] = act_addr_i;
        bank_wdata[b] = ext_word;
        bank_wmask[b] = ext_mask;
      end else begin
        bank_we[b]    = out_to_bank && (cur_q != 1'(b));
        bank_waddr[b] = AW'(pool_y) * AW'(W_MAX) + AW'(pool_x);
        bank_wdata[b] = pool_data;
        bank_wmask[b] = '1;
      end
      bank_re[b] = loading && !cfg.src_tcn && (cur_q == 1'(b));
    end

    cutie_act_mem #(.N_CH(N_CH), .DEPTH(W_MAX * W_MAX)) u_mem (
      .clk_i   (clk_i),
      .we_i    (bank_we[b]),
      .waddr_i (bank_waddr[b]),
      .wdata_i (bank_wdata[b]),
      .wmask_i (bank_wmask[b]),
      .re_i    (bank_re[b]),
      .raddr_i (rd_addr),
      .rdata_o (bank_rdata[b])
    );
  end

  cutie_tcn_buf #(.N_CH(N_CH), .DEPTH(TCN_DEPTH)) u_tcn (
    .clk_i       (clk_i),
    .rst_ni      (rst_ni),
    .push_i      (pool_valid && cfg.to_tcn),
    .push_data_i (pool_data),
    .n_win_i     ($clog2(TCN_DEPTH+1)'(cfg.in_w)),
    .rd_t_i      ($clog2(TCN_DEPTH)'(load_col_q)),
    .rd_data_o   (tcn_rdata)
  );

  always_ff @(posedge clk_i) begin
    if (loading && cfg.src_tcn) tcn_q <= tcn_rdata;
  end

  assign lb_wdata = cfg.src_tcn ? tcn_q : bank_rdata[cur_q];

  // window rows of a 2D layer
  logic [2:0][1:0] row_slot;
  logic [2:0]      row_valid;
  always_comb begin
    int ir;
    for (int r = 0; r < 3; r++) begin
      ir = int'(oy_q) + r - (cfg.pad_same ? 1 : 0);
      row_valid[r] = (ir >= 0) && (ir < int'(h_in));
      row_slot[r]  = 2'((ir < 0 ? 0 : ir) % 3);
    end
  end

  cutie_linebuf #(.N_CH(N_CH), .W_MAX(W_MAX)) u_lb (
    .clk_i       (clk_i),
    .we_i        (pend_valid_q),
    .wslot_i     (pend_slot_q),
    .wcol_i      ($clog2(W_MAX)'(pend_col_q)),
    .wdata_i     (lb_wdata),
    .mode_1d_i   (cfg.is_1d),
    .row_slot_i  (row_slot),
    .row_valid_i (row_valid),
    .cx_i        (cfg.pad_same ? ox_q : ox_q + 8'd1),
    .width_i     (w_in),
    .t_i         (cfg.pad_same ? ox_q : ox_q + k_span),
    .ksize_i     (cfg.ksize),
    .dil_i       (cfg.dil),
    .win_o       (win)
  );

  // ---------------- OCU array ----------------
  tern_t [N_CH-1:0]     y_vec;
  logic signed [ZW-1:0] z_vec [N_CH];

  for (genvar o = 0; o < int'(N_CH); o++) begin : g_ocu
    cutie_ocu #(.N_CH(N_CH), .N_LAYERS(N_LAYERS), .ZW(ZW)) u_ocu (
      .clk_i      (clk_i),
      .wr_en_i    (wt_we_i && (wt_ocu_i == OW'(o))),
      .wr_layer_i (wt_layer_i),
      .wr_w_i     (wt_w_i),
      .wr_tlo_i   (wt_tlo_i),
      .wr_thi_i   (wt_thi_i),
      .layer_i    (layer_q),
      .win_i      (win),
      .z_o        (z_vec[o]),
      .y_o        (y_vec[o])
    );
  end

  logic computing;
  assign computing = (state_q == S_COMP);

  cutie_pool #(.N_CH(N_CH), .W_MAX(W_MAX)) u_pool (
    .clk_i       (clk_i),
    .rst_ni      (rst_ni),
    .pool_en_i   (cfg.pool && !cfg.is_1d),
    .in_valid_i  (computing && !cfg.last),
    .in_x_i      (ox_q),
    .in_y_i      (oy_q),
    .in_data_i   (y_vec),
    .out_valid_o (pool_valid),
    .out_x_o     (pool_x),
    .out_y_o     (pool_y),
    .out_data_o  (pool_data)
  );

  // ---------------- sequencer ----------------
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q      <= S_IDLE;
      layer_q      <= '0;
      cur_q        <= 1'b0;
      oy_q         <= '0;
      ox_q         <= '0;
      next_load_q  <= '0;
      load_col_q   <= '0;
      pend_valid_q <= 1'b0;
      pend_col_q   <= '0;
      pend_slot_q  <= '0;
      drain_q      <= '0;
      done_o       <= 1'b0;
      for (int k = 0; k < int'(N_CLASSES); k++) scores_o[k] <= '0;
    end else begin
      done_o       <= 1'b0;
      pend_valid_q <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start_i) begin
          layer_q <= '0;
          cur_q   <= 1'b0;
          state_q <= S_LSTART;
        end
        S_LSTART: begin
          oy_q        <= '0;
          ox_q        <= '0;
          next_load_q <= '0;
          state_q     <= S_PREP;
        end
        S_PREP: begin
          if (next_load_q <= need_row && next_load_q < h_in) begin
            load_col_q <= '0;
            state_q    <= S_LOAD;
          end else begin
            ox_q    <= '0;
            state_q <= S_COMP;
          end
        end
        S_LOAD: begin
          if (load_col_q < w_in) begin
            pend_valid_q <= 1'b1;
            pend_col_q   <= load_col_q;
            pend_slot_q  <= 2'(next_load_q % 8'd3);
            load_col_q   <= load_col_q + 8'd1;
          end else begin
            next_load_q <= next_load_q + 8'd1;
            state_q     <= S_PREP;
          end
        end
        S_COMP: begin
          if (cfg.last && ox_q == 8'd0 && oy_q == 8'd0) begin
            for (int k = 0; k < int'(N_CLASSES); k++) scores_o[k] <= z_vec[k];
          end
          if (ox_q == w_out - 8'd1) begin
            ox_q <= '0;
            if (oy_q == h_out - 8'd1) begin
              drain_q <= '0;
              state_q <= S_DRAIN;
            end else begin
              oy_q    <= oy_q + 8'd1;
              state_q <= S_PREP;
            end
          end else begin
            ox_q <= ox_q + 8'd1;
          end
        end
        S_DRAIN: begin
          drain_q <= drain_q + 2'd1;
          if (drain_q == 2'd2) begin
            if (cfg.last || 32'(layer_q) == N_LAYERS - 1) begin
              state_q <= S_FIN;
            end else begin
              if (!cfg.to_tcn) cur_q <= ~cur_q;
              layer_q <= layer_q + 1'b1;
              state_q <= S_LSTART;
            end
          end
        end
        S_FIN: begin
          done_o  <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy_o      = (state_q != S_IDLE);
  assign act_ready_o = (state_q == S_IDLE);

  always_comb begin
    class_o = '0;
    for (int k = 1; k < int'(N_CLASSES); k++)
      if (scores_o[k] > scores_o[class_o]) class_o = CW'(k);
  end

endmodule
