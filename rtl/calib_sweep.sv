// calib_sweep -- sweeps all select-word pairs and produces the calibration table.
//
// The tuneable oscillators give many possible TDCs: every pair of select words
// with INV_SEL inverters each (56 x 56 = 3136 pairs for three inverters among
// eight). The sweep visits every pair in turn, with the slow word in the outer
// loop and both words in increasing numeric order, and for each pair:
//   1. stops the rings (tdc_clear high, free_run low) for CLR_CYC reference
//      periods and applies the two select words;
//   2. lets both rings run freely and starts the period calibration (cal_go);
//   3. waits until the period counts are done and the beat count is valid, or
//      until beat_timeout reference periods have passed (equal periods never
//      coincide);
//   4. emits one record (rec, rec_valid for one reference period).
// From a record the host gets T_slow and T_fast against the reference and the
// resolution dt = T_slow / beat; the sign of dt follows from the two period
// counts. done rises after the last pair and stays high until the next go.
//
// Runs on clk_ref. beat_valid comes from the fast oscillator domain and passes
// through a two-flip-flop synchroniser; beat itself is held by the source once
// valid and is read after the synchronised flag. The sweep over all
// combinations is the reference design's calibration procedure; doing it in
// hardware, the order, the timeout and the record format are this design's
// choices.
module calib_sweep
  import tdc_pkg::*;
#(
  parameter int unsigned CLR_CYC = 2,    // reference periods with the rings stopped
  parameter int unsigned TMO_W   = 20    // width of beat_timeout
) (
  input  logic               clk_ref,
  input  logic               rst_n,
  input  logic               go,
  input  logic [TMO_W-1:0]   beat_timeout,
  // to the TDC
  output logic [N_CELLS-1:0] sel_slow,
  output logic [N_CELLS-1:0] sel_fast,
  output logic               tdc_clear,
  output logic               free_run,
  output logic               cal_go,
  // from the TDC
  input  logic               cal_done,
  input  logic [CAL_W-1:0]   n_calib_slow,
  input  logic [CAL_W-1:0]   n_calib_fast,
  input  logic [CNT_W-1:0]   beat,
  input  logic               beat_valid,
  // calibration table
  output logic               busy,
  output logic               done,
  output logic               rec_valid,
  output sweep_rec_t         rec
);
  timeunit 1ps; timeprecision 1ps;

  typedef enum logic [2:0] {S_IDLE, S_FIND, S_CLEAR, S_START, S_WAIT, S_EMIT} state_t;

  state_t            state;
  logic [N_CELLS:0]  ws, wf;        // candidate words, one extra bit marks the wrap
  logic [TMO_W-1:0]  timer;
  logic              bv1, bv2;      // beat_valid synchroniser
  logic              go_d;

  function automatic int unsigned ones(logic [N_CELLS-1:0] w);
    int unsigned n = 0;
    for (int i = 0; i < N_CELLS; i++) n += w[i];
    return n;
  endfunction

  always_ff @(posedge clk_ref or negedge rst_n) begin
    if (!rst_n) {bv2, bv1} <= '0;
    else        {bv2, bv1} <= {bv1, beat_valid};
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk_ref or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      ws        <= '0;
      wf        <= '0;
      timer     <= '0;
      sel_slow  <= '0;
      sel_fast  <= '0;
      tdc_clear <= 1'b0;
      free_run  <= 1'b0;
      cal_go    <= 1'b0;
      done      <= 1'b0;
      rec_valid <= 1'b0;
      rec       <= '0;
      go_d      <= 1'b0;
    end else begin
      go_d      <= go;
      cal_go    <= 1'b0;
      rec_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (go && !go_d) begin
          done  <= 1'b0;
          ws    <= '0;
          wf    <= '0;
          state <= S_FIND;
        end
        // Step the fast word (and on its wrap the slow word) until both hold
        // INV_SEL ones; one candidate per clock.
        S_FIND: begin
          if (ws[N_CELLS]) begin
            state <= S_IDLE;            // slow word wrapped: sweep finished
            done  <= 1'b1;
          end else if (ones(ws[N_CELLS-1:0]) != INV_SEL) begin
            ws <= ws + 1'b1;
            wf <= '0;
          end else if (wf[N_CELLS]) begin
            ws <= ws + 1'b1;
            wf <= '0;
          end else if (ones(wf[N_CELLS-1:0]) != INV_SEL) begin
            wf <= wf + 1'b1;
          end else begin
            sel_slow  <= ws[N_CELLS-1:0];
            sel_fast  <= wf[N_CELLS-1:0];
            tdc_clear <= 1'b1;
            free_run  <= 1'b0;
            timer     <= TMO_W'(CLR_CYC - 1);
            state     <= S_CLEAR;
          end
        end
        S_CLEAR: if (timer == '0) begin
          tdc_clear <= 1'b0;
          free_run  <= 1'b1;
          cal_go    <= 1'b1;
          state     <= S_START;
        end else begin
          timer <= timer - 1'b1;
        end
        S_START: begin                  // cal_done drops on this edge
          timer <= '0;
          state <= S_WAIT;
        end
        S_WAIT: begin
          timer <= timer + 1'b1;
          if ((cal_done && bv2) || (cal_done && timer >= beat_timeout)) begin
            rec.sel_slow     <= sel_slow;
            rec.sel_fast     <= sel_fast;
            rec.n_calib_slow <= n_calib_slow;
            rec.n_calib_fast <= n_calib_fast;
            rec.beat         <= bv2 ? beat : '0;
            rec.beat_ok      <= bv2;
            state            <= S_EMIT;
          end
        end
        S_EMIT: begin
          rec_valid <= 1'b1;
          free_run  <= 1'b0;
          wf        <= wf + 1'b1;
          state     <= S_FIND;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
