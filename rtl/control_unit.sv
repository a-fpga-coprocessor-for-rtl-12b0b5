// control_unit: GAPPCO configuration and processing control.
//
// Configuration phase: the host sends the configuration stream one 32-bit
// word at a time (cfg_valid, cfg_data). A word pointer, cleared by
// cfg_clear, distributes word i to unit i/2 (unit = stage*N_LANES + lane,
// the pair of a routing matrix and its Dot Vectors unit) as word i%2, by a
// one-hot write enable unit_cfg_we and the shared cfg_word/cfg_data_o bus.
// After CFG_WORDS words cfg_loaded is set; a further word is dropped
// and sets cfg_overflow. Words sent during a run are dropped too.
// Processing phase: start (with the configuration loaded and no run in
// progress) walks the rows in order. For row s it pulses launch[s] so that
// the row's routing matrices capture their operands, waits for the row's
// Dot Vectors units to report results (stage_done[s]) and in that cycle
// raises rf_we[s] to store them in the next register file. After the last
// row done is set (cleared by the next start) and run_cycles holds
// the number of cycles the run was busy; with the default latencies a run
// takes 10 cycles.
// The two phases and the control unit's role in both follow the
// description of GAPPCO; the stream format and this sequencing are this
// design's choices.
module control_unit
  import gappco_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // configuration stream from the host
  input  logic                cfg_clear,
  input  logic                cfg_valid,
  input  logic [31:0]         cfg_data,
  // configuration distribution to the units
  output logic [N_UNITS-1:0]  unit_cfg_we,
  output logic                cfg_word,
  output logic [31:0]         cfg_data_o,
  // processing control
  input  logic                start,
  output logic [N_STAGES-1:0] launch,
  input  logic [N_STAGES-1:0] stage_done,
  output logic [N_STAGES-1:0] rf_we,
  // to the host
  output status_t             status,
  output logic [31:0]         run_cycles
);
  typedef enum logic [1:0] {S_IDLE, S_LAUNCH, S_RUN} state_e;

  localparam int unsigned PTR_W = $clog2(CFG_WORDS + 1);
  localparam int unsigned UNIT_W = $clog2(N_UNITS);
  localparam int unsigned STG_W = (N_STAGES > 1) ? $clog2(N_STAGES) : 1;

  state_e             state;
  logic [PTR_W-1:0]   ptr;
  logic [STG_W-1:0]   stage;
  logic               cfg_accept;
  logic               busy, done, cfg_loaded, cfg_overflow;

  assign status = '{cfg_overflow: cfg_overflow, cfg_loaded: cfg_loaded,
                    done: done, busy: busy};

  assign busy        = (state != S_IDLE);
  assign cfg_accept  = cfg_valid && !cfg_clear && !busy &&
                       (32'(ptr) < CFG_WORDS);
  assign cfg_word    = ptr[0];
  assign cfg_data_o  = cfg_data;

  always_comb begin
    unit_cfg_we = '0;
    if (cfg_accept) unit_cfg_we[UNIT_W'(ptr >> 1)] = 1'b1;
  end

  // configuration pointer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr                 <= '0;
      cfg_loaded   <= 1'b0;
      cfg_overflow <= 1'b0;
    end else if (cfg_clear) begin
      ptr                 <= '0;
      cfg_loaded   <= 1'b0;
      cfg_overflow <= 1'b0;
    end else if (cfg_valid && !busy) begin
      if (cfg_accept) begin
        ptr <= ptr + 1'b1;
        if (32'(ptr) == CFG_WORDS - 1) cfg_loaded <= 1'b1;
      end else begin
        cfg_overflow <= 1'b1;
      end
    end
  end

  // processing sequence
  always_comb begin
    launch = '0;
    rf_we  = '0;
    if (state == S_LAUNCH) launch[stage] = 1'b1;
    if (state == S_RUN && stage_done[stage]) rf_we[stage] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      stage       <= '0;
      done <= 1'b0;
      run_cycles  <= '0;
    end else begin
      if (busy) run_cycles <= run_cycles + 32'd1;
      unique case (state)
        S_IDLE: if (start && cfg_loaded) begin
          state       <= S_LAUNCH;
          stage       <= '0;
          done <= 1'b0;
          run_cycles  <= '0;
        end
        S_LAUNCH: state <= S_RUN;
        S_RUN: if (stage_done[stage]) begin
          if (32'(stage) == N_STAGES - 1) begin
            state       <= S_IDLE;
            done <= 1'b1;
          end else begin
            stage <= stage + 1'b1;
            state <= S_LAUNCH;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a row reports results only while it is being waited for
  assert property (@(posedge clk) disable iff (!rst_n)
                   |stage_done |-> (state == S_RUN))
    else $error("control_unit: unexpected stage_done");
endmodule
