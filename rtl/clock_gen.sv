// CPU clock source, as a clock-enable pulse on the reference clock.
//
// Automatic mode (auto_mode high) stands for the free-running astable
// oscillator: a divider raises step for one reference cycle every `period`
// reference cycles (period 0 or 1: every cycle), so the CPU clock rate is
// f_ref / period and is adjustable at run time, as the oscillator's rate is
// by its potentiometer. Manual mode stands for the push-button monostable:
// the button is synchronised, each rising edge gives one step pulse, and a
// timer then ignores the button for MONO_CYCLES reference cycles, which
// absorbs contact bounce and repeated triggers. While halt is high no step
// is issued in either mode, which is how the halt signal gates the clock.
// Two modes, push-button debouncing and halt gating follow the design; the
// divider, the synchroniser and the lock-out time are this design's choices.
module clock_gen #(
  parameter int unsigned PERIOD_W    = 16,
  parameter int unsigned MONO_CYCLES = 1000,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                auto_mode,
  input  logic                button,
  input  logic [PERIOD_W-1:0] period,
  input  logic                halt,
  output logic                step
);

  localparam int unsigned MONO_W = $clog2(MONO_CYCLES + 1);

  logic [PERIOD_W-1:0]    div_cnt;
  logic                   auto_tick;
  logic [SYNC_STAGES-1:0] btn_sync;
  logic                   btn_prev;
  logic [MONO_W-1:0]      mono_cnt;
  logic                   manual_tick;

  // Astable: count reference cycles, tick at the end of each period.
  always_comb auto_tick = auto_mode && (div_cnt + 1'b1 >= period);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      div_cnt <= '0;
    else if (!auto_mode || auto_tick)
      div_cnt <= '0;
    else
      div_cnt <= div_cnt + 1'b1;
  end

  // Monostable: one pulse per press, retrigger blocked while the timer runs.
  always_comb manual_tick = !auto_mode && btn_sync[SYNC_STAGES-1] && !btn_prev
                            && (mono_cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      btn_sync <= '0;
      btn_prev <= 1'b0;
      mono_cnt <= '0;
    end else begin
      btn_sync <= {btn_sync[SYNC_STAGES-2:0], button};
      btn_prev <= btn_sync[SYNC_STAGES-1];
      if (manual_tick)
        mono_cnt <= MONO_W'(MONO_CYCLES);
      else if (mono_cnt != '0)
        mono_cnt <= mono_cnt - 1'b1;
    end
  end

  always_comb step = (auto_tick || manual_tick) && !halt;

endmodule
