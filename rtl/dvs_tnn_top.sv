// End-to-end DVS gesture-recognition pipeline: camera interface, frame
// timer and ternary accelerator.
//
// Events enter the DVS interface, which aggregates them into ternary event
// frames in its frame buffer. The frame timer (or a software tick) marks the
// frame intervals. Every s_win frames the interface streams the newest C_in
// frames to its configured destination address. Destinations inside the
// accelerator's activation window (ACT_BASE .. ACT_BASE + 4*4096) go straight
// into the accelerator's input bank, and its data-ready interrupt starts the
// inference (when autostart_i is set) without any processor involvement. All
// other destinations, and the 32-bit event words of event mode, leave through
// the system memory port (mem_*), standing for the SoC interconnect towards
// L2 memory. Writes into the accelerator wait (mem stall) while it is busy.
// The accelerator's done interrupt and class scores are outputs, for the
// fabric controller to read.
// The connections follow the documented SoC; the address of the activation
// window and the stall while the accelerator runs are this design's choices.
module dvs_tnn_top
  import cutie_pkg::*;
  import dvs_pkg::*;
#(
  parameter int unsigned N_CH      = 96,
  parameter int unsigned N_LAYERS  = 9,
  parameter int unsigned TCN_DEPTH = 24,
  parameter int unsigned N_CLASSES = 11,
  parameter int unsigned ZW        = 12,
  parameter logic [31:0] ACT_BASE  = 32'h1040_0000,
  localparam int unsigned LW = $clog2(N_LAYERS),
  localparam int unsigned OW = $clog2(N_CH),
  localparam int unsigned CW = $clog2(N_CLASSES)
) (
  input  logic                        clk_i,
  input  logic                        rst_ni,
  // DVS interface configuration and camera events
  input  dvs_cfg_t                    dvs_cfg_i,
  input  logic                        evt_valid_i,
  input  dvs_event_t                  evt_i,
  output logic                        evt_ready_o,
  // frame timing
  input  logic                        timer_en_i,
  input  logic [31:0]                 timer_period_i,
  input  logic                        sw_frame_tick_i,
  // system memory port (towards L2)
  output logic                        mem_valid_o,
  output logic [31:0]                 mem_addr_o,
  output logic [31:0]                 mem_data_o,
  input  logic                        mem_ready_i,
  // accelerator configuration
  input  logic                        wt_we_i,
  input  logic [LW-1:0]               wt_layer_i,
  input  logic [OW-1:0]               wt_ocu_i,
  input  tern_t [TAPS-1:0][N_CH-1:0]  wt_w_i,
  input  logic signed [ZW-1:0]        wt_tlo_i,
  input  logic signed [ZW-1:0]        wt_thi_i,
  input  logic                        cfg_we_i,
  input  logic [LW-1:0]               cfg_layer_i,
  input  layer_cfg_t                  cfg_data_i,
  input  logic                        autostart_i,
  input  logic                        cutie_start_i,
  // interrupts and results
  output logic                        irq_dvs_o,
  output logic                        irq_cutie_o,
  output logic                        cutie_busy_o,
  output logic signed [ZW-1:0]        scores_o [N_CLASSES],
  output logic [CW-1:0]               class_o,
  // status
  output logic [3:0]                  c_curr_o,
  output logic                        overrun_o,
  output logic                        fb_conflict_o,
  output logic                        evt_dropped_o,
  output logic                        readout_busy_o
);

  logic frame_tick, timer_tick;

  frame_timer #(.CW(32)) u_timer (
    .clk_i    (clk_i),
    .rst_ni   (rst_ni),
    .enable_i (timer_en_i),
    .period_i (timer_period_i),
    .tick_o   (timer_tick)
  );

  assign frame_tick = timer_tick || sw_frame_tick_i;

  logic        m_valid, m_ready;
  logic [31:0] m_addr, m_data;

  dvs_interface #(.FB_DEPTH(FB_WORDS)) u_dvs (
    .clk_i               (clk_i),
    .rst_ni              (rst_ni),
    .cfg_i               (dvs_cfg_i),
    .evt_valid_i         (evt_valid_i),
    .evt_i               (evt_i),
    .evt_ready_o         (evt_ready_o),
    .frame_tick_i        (frame_tick),
    .m_valid_o           (m_valid),
    .m_addr_o            (m_addr),
    .m_data_o            (m_data),
    .m_ready_i           (m_ready),
    .irq_o               (irq_dvs_o),
    .c_curr_o            (c_curr_o),
    .readout_busy_o      (readout_busy_o),
    .fb_conflict_o       (fb_conflict_o),
    .evt_dropped_o       (evt_dropped_o),
    .overrun_o           (overrun_o)
  );

  // address decode: accelerator activation window or system memory
  logic        to_act, act_ready;
  logic [31:0] act_off;

  assign act_off = m_addr - ACT_BASE;
  assign to_act  = (m_addr >= ACT_BASE) && (act_off < 32'(4 * FB_WORDS));

  assign m_ready     = to_act ? act_ready : mem_ready_i;
  assign mem_valid_o = m_valid && !to_act;
  assign mem_addr_o  = m_addr;
  assign mem_data_o  = m_data;

  cutie #(
    .N_CH      (N_CH),
    .W_MAX     (FRAME_DIM),
    .N_LAYERS  (N_LAYERS),
    .TCN_DEPTH (TCN_DEPTH),
    .N_CLASSES (N_CLASSES),
    .ZW        (ZW)
  ) u_cutie (
    .clk_i       (clk_i),
    .rst_ni      (rst_ni),
    .wt_we_i     (wt_we_i),
    .wt_layer_i  (wt_layer_i),
    .wt_ocu_i    (wt_ocu_i),
    .wt_w_i      (wt_w_i),
    .wt_tlo_i    (wt_tlo_i),
    .wt_thi_i    (wt_thi_i),
    .cfg_we_i    (cfg_we_i),
    .cfg_layer_i (cfg_layer_i),
    .cfg_data_i  (cfg_data_i),
    .act_we_i    (m_valid && to_act),
    .act_addr_i  (act_off[13:2]),
    .act_wdata_i (m_data),
    .act_ready_o (act_ready),
    .start_i     (cutie_start_i || (autostart_i && irq_dvs_o)),
    .busy_o      (cutie_busy_o),
    .done_o      (irq_cutie_o),
    .scores_o    (scores_o),
    .class_o     (class_o)
  );

endmodule
