// scope_acq: Scope-mode (raw data) acquisition and formatting of a Detector Board.
//
// All CH channels' ADC samples are written, one row per sample, into a
// circular buffer of DEPTH rows while the board is armed. A trigger is any
// channel whose trigger mask bit is set and that either has its hardware
// trigger input high (the analog comparator against the DAC threshold) or
// whose sample exceeds the firmware threshold. On a trigger the window of
// num_samples samples that starts pre_samples samples before the triggering
// sample is frozen: writing continues only until the window is complete.
// For trig_window samples after the trigger every channel is watched, and a
// channel that triggers then gets its hardware/firmware hit flags (and TDC
// value) in its header. The frozen window is then read out as one block:
//
//   detector board header (ID 0x4), then for channel 0 .. CH-1:
//   channel header (ID 0x3) followed by num_samples ADC packets (ID 0x1).
//
// The block's last packet has out_last set. While a block is captured or
// read out, further triggers are ignored; afterwards the board re-arms once
// pre_samples new samples have been stored.
//
// Interface: configuration (mode, run, cfg, trig_mask, fw_threshold, board
// addresses), ADC input (sample_valid, adc, hw_trig, tdc), packet output
// (out_valid/out_ready/out_data/out_last), status (busy, events).
// Timing: one sample per clock at most; the read-out gives one packet every
// two clocks, matching the 16-bit link that carries 32-bit packets.
// Packet formats, the four settings and the trigger-window behaviour follow
// the document. The shared circular buffer, the arming rule, the meaning of
// num_samples as the whole window (pre-trigger samples included) and reading
// all channels out on every trigger are this design's own choices.
module scope_acq
  import openpet_pkg::*;
#(
  parameter int unsigned CH    = 16,
  parameter int unsigned ADC_W = 12,
  parameter int unsigned DEPTH = 512
) (
  input  logic                      clk,
  input  logic                      rst,
  // configuration
  input  logic [3:0]                mode,
  input  logic                      run,
  input  scope_cfg_t                cfg,
  input  logic [CH-1:0]             trig_mask,
  input  logic [ADC_W-1:0]          fw_threshold,
  input  logic [2:0]                db_addr,
  input  logic [2:0]                du_addr,
  input  logic [2:0]                mb_addr,
  // ADC and trigger inputs
  input  logic                      sample_valid,
  input  logic [CH-1:0][ADC_W-1:0]  adc,
  input  logic [CH-1:0]             hw_trig,
  input  logic [CH-1:0][19:0]       tdc,
  // packet output
  output logic                      out_valid,
  input  logic                      out_ready,
  output logic [31:0]               out_data,
  output logic                      out_last,
  // status
  output logic                      busy,
  output logic [15:0]               events
);
  localparam int unsigned AW  = $clog2(DEPTH);
  localparam int unsigned CHW = (CH > 1) ? $clog2(CH) : 1;

  typedef enum logic [2:0] {
    S_IDLE, S_ARMED, S_CAPTURE, S_HDR_DB, S_HDR_CH, S_ISSUE, S_LOAD
  } state_t;

  state_t                   state;
  logic [CH*ADC_W-1:0]      mem [DEPTH];
  logic [CH*ADC_W-1:0]      mem_q;
  logic [AW-1:0]            wp, win_start;
  logic [4:0]               fill;
  logic [9:0]               cap_cnt;
  logic [4:0]               tw_rem;
  logic [8:0]               ns, k;
  logic [3:0]               pre, fmt;
  logic [CH-1:0]            hw_hit, fw_hit, fw_over, trig_vec;
  logic [CH-1:0][19:0]      tdc_q;
  logic [CHW-1:0]           ch;
  logic                     slot;
  logic [CH*ADC_W-1:0]      row;

  for (genvar c = 0; c < int'(CH); c++) begin : g_ch
    assign fw_over[c] = adc[c] > fw_threshold;
    assign row[c*ADC_W +: ADC_W] = adc[c];
  end
  assign trig_vec = trig_mask & (hw_trig | fw_over);
  assign slot     = !out_valid || out_ready;
  assign busy     = (state != S_IDLE) && (state != S_ARMED);

  // buffer write port: armed, or capturing the rest of the window
  logic wr_en;
  assign wr_en = sample_valid &&
                 ((state == S_ARMED) || (state == S_CAPTURE && cap_cnt < {1'b0, ns}));

  always_ff @(posedge clk) begin
    if (wr_en) mem[wp] <= row;
    mem_q <= mem[win_start + AW'(k)];
  end

  function automatic logic [31:0] db_header();
    db_hdr_t h;
    h = '0;
    h.pid         = PID_DB_HDR;
    h.data_format = {1'b0, fmt};
    h.mb_addr     = mb_addr;
    h.duc_addr    = du_addr;
    h.db_addr     = db_addr;
    h.num_ch_hdr  = 6'(CH);
    return h;
  endfunction

  function automatic logic [31:0] ch_header(input logic [CHW-1:0] c);
    ch_hdr_t h;
    h.pid     = PID_CH_HDR;
    h.ch_addr = 6'(c);
    h.fw_hit  = fw_hit[c];
    h.hw_hit  = hw_hit[c];
    h.tdc     = tdc_q[c];
    return h;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      wp        <= '0;
      win_start <= '0;
      fill      <= '0;
      cap_cnt   <= '0;
      tw_rem    <= '0;
      ns        <= '0;
      k         <= '0;
      pre       <= '0;
      fmt       <= '0;
      hw_hit    <= '0;
      fw_hit    <= '0;
      tdc_q     <= '0;
      ch        <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_last  <= 1'b0;
      events    <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (wr_en) wp <= wp + 1'b1;

      unique case (state)
        S_IDLE: begin
          fill <= '0;
          if (mode == MODE_SCOPE && run) state <= S_ARMED;
        end

        S_ARMED: begin
          if (!(mode == MODE_SCOPE && run)) begin
            state <= S_IDLE;
          end else if (sample_valid) begin
            if (fill != 5'd16) fill <= fill + 1'b1;
            if (|trig_vec && fill >= {1'b0, cfg.pre_samples}) begin
              win_start <= wp - AW'(cfg.pre_samples);
              cap_cnt   <= 10'(cfg.pre_samples) + 10'd1;
              ns        <= cfg.num_samples;
              pre       <= cfg.pre_samples;
              fmt       <= cfg.data_format;
              tw_rem    <= {1'b0, cfg.trig_window};
              hw_hit    <= trig_mask & hw_trig;
              fw_hit    <= trig_mask & fw_over;
              for (int c = 0; c < int'(CH); c++)
                tdc_q[c] <= trig_vec[c] ? tdc[c] : 20'h0;
              state     <= S_CAPTURE;
            end
          end
        end

        S_CAPTURE: begin
          if (sample_valid) begin
            if (cap_cnt < {1'b0, ns}) cap_cnt <= cap_cnt + 1'b1;
            if (tw_rem != '0) begin
              tw_rem <= tw_rem - 1'b1;
              hw_hit <= hw_hit | (trig_mask & hw_trig);
              fw_hit <= fw_hit | (trig_mask & fw_over);
              for (int c = 0; c < int'(CH); c++)
                if (trig_vec[c] && !(hw_hit[c] || fw_hit[c])) tdc_q[c] <= tdc[c];
            end
          end
          if (cap_cnt >= {1'b0, ns} && tw_rem == '0) state <= S_HDR_DB;
        end

        S_HDR_DB: begin
          if (slot) begin
            out_valid <= 1'b1;
            out_data  <= db_header();
            out_last  <= 1'b0;
            ch        <= '0;
            state     <= S_HDR_CH;
          end
        end

        S_HDR_CH: begin
          if (slot) begin
            out_valid <= 1'b1;
            out_data  <= ch_header(ch);
            k         <= '0;
            if (ns != '0) begin
              out_last <= 1'b0;
              state    <= S_ISSUE;
            end else if (ch == CHW'(CH - 1)) begin
              out_last <= 1'b1;
              events   <= events + 1'b1;
              state    <= S_ARMED;
              fill     <= '0;
            end else begin
              out_last <= 1'b0;
              ch       <= ch + 1'b1;
            end
          end
        end

        S_ISSUE: state <= S_LOAD;   // mem_q follows k one clock later

        S_LOAD: begin
          if (slot) begin
            out_valid <= 1'b1;
            out_data  <= {PID_SAMPLE, 28'(mem_q[ch*ADC_W +: ADC_W])};
            if (k + 1'b1 != ns) begin
              out_last <= 1'b0;
              k        <= k + 1'b1;
              state    <= S_ISSUE;
            end else if (ch == CHW'(CH - 1)) begin
              out_last <= 1'b1;
              events   <= events + 1'b1;
              state    <= S_ARMED;
              fill     <= '0;
            end else begin
              out_last <= 1'b0;
              ch       <= ch + 1'b1;
              state    <= S_HDR_CH;
            end
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  a_last_only_when_valid: assert property (@(posedge clk) disable iff (rst)
    (out_valid && out_last) |-> (state == S_ARMED || state == S_IDLE || !busy));
endmodule
