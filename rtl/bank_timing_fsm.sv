// bank_timing_fsm: state and timing of one memory bank.
//
// Models the bank state diagram of the channel model: Idle, Activating,
// Bank Active, ReActivating (second activation for RowClone / Ambit),
// Reading, Writing, Reading/Writing with auto precharge, Precharging and
// Refreshing. Latencies are counters that, together with the decoded
// commands, gate the transitions:
//   Idle --ACT--> Activating --tRCD--> Bank Active
//   Idle --REF--> Refreshing --tRFC--> Idle
//   Bank Active --ACT--> ReActivating --tCL--> Bank Active
//   Bank Active --RD/WR, after tCL/tCWL--> Reading/Writing (RDA/WRA: the APR states)
//   Reading/Writing --burst done--> Bank Active, or straight to the next
//     burst when a queued RD/WR is due (the RD and WR arcs)
//   Bank Active/Reading/Writing --PR & tRAS (& tRTP / tWR)--> Precharging
//   Reading APR/Writing APR --burst & tRTP/tWR & tRAS--> Precharging --tRP--> Idle
//
// Timing parameters are given in interface clock cycles (tCK) and scaled by
// RATIO, the number of model clocks per interface clock (2: the model clock
// runs at double rate so that one data beat takes one model clock). A state
// entered by a command cycle c ends so that the next state starts at
// c + RATIO*t. The tABA/tABAR arcs of the diagram are taken as the end of the
// BL-beat burst. A command the current state cannot take is ignored and
// flagged on `violation` in the cycle it arrives. Everything freezes while en
// is low (the emulated system is stalled). rd_beat/wr_beat mark the model
// clocks in which one burst beat is transferred.
// The states, arcs and counters follow the published PiMulator design; the DDR4-2400 default
// values, the queueing of a RD/WR that arrives during a burst, and holding a
// PRE in Bank Active to tWR/tRTP as well as tRAS are this design's choices.
module bank_timing_fsm
  import pim_pkg::*;
#(
  parameter int unsigned RATIO = 2,
  parameter int unsigned BL    = 8,
  parameter int unsigned T_RCD = 17,
  parameter int unsigned T_CL  = 17,
  parameter int unsigned T_CWL = 12,
  parameter int unsigned T_RAS = 39,
  parameter int unsigned T_RP  = 17,
  parameter int unsigned T_RFC = 312,
  parameter int unsigned T_WR  = 18,
  parameter int unsigned T_RTP = 9
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        cmd_hit,    // cmd is addressed to this bank (or to all banks)
  input  cmd_t        cmd,
  output bank_state_t state,
  output logic        rd_beat,
  output logic        wr_beat,
  output logic        act_accept, // ACT taken in Idle
  output logic        react,      // ACT taken in Bank Active (second activation)
  output logic        violation
);

  localparam int unsigned CW   = 16;
  localparam int unsigned C_RCD = RATIO * T_RCD;
  localparam int unsigned C_CL  = RATIO * T_CL;
  localparam int unsigned C_CWL = RATIO * T_CWL;
  localparam int unsigned C_RAS = RATIO * T_RAS;
  localparam int unsigned C_RP  = RATIO * T_RP;
  localparam int unsigned C_RFC = RATIO * T_RFC;
  localparam int unsigned C_WR  = RATIO * T_WR;
  localparam int unsigned C_RTP = RATIO * T_RTP;

  logic [CW-1:0] timer, t_ras, t_wr, t_rtp, pend_cnt;
  logic [$clog2(BL+1)-1:0] beat;
  logic          pend_valid;
  cmd_t          pend_cmd;

  logic is_col, is_pre, pend_ready, ras_ok, wr_ok, rtp_ok, burst_last, burst_done;

  assign is_col     = cmd_hit && (cmd == CMD_RD || cmd == CMD_RDA || cmd == CMD_WR || cmd == CMD_WRA);
  assign is_pre     = cmd_hit && (cmd == CMD_PRE || cmd == CMD_PREA);
  assign pend_ready = pend_valid && pend_cnt == '0;
  assign ras_ok     = t_ras >= CW'(C_RAS);
  assign wr_ok      = t_wr  >= CW'(C_WR);
  assign rtp_ok     = t_rtp >= CW'(C_RTP);
  assign burst_last = beat == ($bits(beat))'(BL - 1);
  assign burst_done = beat >= ($bits(beat))'(BL);

  function automatic logic [CW-1:0] sat_inc(input logic [CW-1:0] v);
    return (v == '1) ? v : v + 1'b1;
  endfunction

  function automatic bank_state_t burst_state(input cmd_t c);
    unique case (c)
      CMD_RD:  return ST_READING;
      CMD_RDA: return ST_READING_APR;
      CMD_WR:  return ST_WRITING;
      default: return ST_WRITING_APR;
    endcase
  endfunction

  // Commands this state refuses.
  always_comb begin
    violation = 1'b0;
    if (en && cmd_hit) begin
      unique case (state)
        ST_IDLE:
          violation = is_col;
        ST_ACTIVE:
          violation = (cmd == CMD_REF) || (is_pre && !(ras_ok && wr_ok && rtp_ok));
        ST_READING:
          violation = (cmd == CMD_ACT) || (cmd == CMD_REF) || (is_pre && !(ras_ok && rtp_ok));
        ST_WRITING:
          violation = (cmd == CMD_ACT) || (cmd == CMD_REF) || (is_pre && !(ras_ok && wr_ok));
        ST_PRECHARGING:
          violation = (cmd == CMD_ACT) || is_col || (cmd == CMD_REF) || (cmd == CMD_PRE);
        default:
          violation = (cmd == CMD_ACT) || is_col || (cmd == CMD_REF) || is_pre;
      endcase
    end
  end

  assign act_accept = en && cmd_hit && cmd == CMD_ACT && state == ST_IDLE;
  assign react      = en && cmd_hit && cmd == CMD_ACT && state == ST_ACTIVE;
  assign rd_beat    = en && (state == ST_READING || state == ST_READING_APR) && !burst_done;
  assign wr_beat    = en && (state == ST_WRITING || state == ST_WRITING_APR) && !burst_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST_IDLE;
      timer      <= '0;
      t_ras      <= '1;
      t_wr       <= '1;
      t_rtp      <= '1;
      beat       <= '0;
      pend_valid <= 1'b0;
      pend_cmd   <= CMD_NOP;
      pend_cnt   <= '0;
    end else if (en) begin
      t_ras <= sat_inc(t_ras);
      t_wr  <= (wr_beat && burst_last) ? CW'(1) : sat_inc(t_wr);
      t_rtp <= (rd_beat && beat == '0) ? CW'(1) : sat_inc(t_rtp);
      if (pend_cnt != '0) pend_cnt <= pend_cnt - 1'b1;

      unique case (state)
        ST_IDLE: begin
          if (cmd_hit && cmd == CMD_ACT) begin
            state <= ST_ACTIVATING;
            timer <= CW'(C_RCD - 2);
            t_ras <= CW'(1);
          end else if (cmd_hit && cmd == CMD_REF) begin
            state <= ST_REFRESHING;
            timer <= CW'(C_RFC - 2);
          end
        end
        ST_ACTIVATING, ST_REACTIVATING: begin
          if (timer == '0) state <= ST_ACTIVE;
          else timer <= timer - 1'b1;
        end
        ST_PRECHARGING, ST_REFRESHING: begin
          if (timer == '0) state <= ST_IDLE;
          else timer <= timer - 1'b1;
        end
        ST_ACTIVE: begin
          if (cmd_hit && cmd == CMD_ACT) begin
            state <= ST_REACTIVATING;
            timer <= CW'(C_CL - 2);
          end else if (is_pre && ras_ok && wr_ok && rtp_ok) begin
            state      <= ST_PRECHARGING;
            timer      <= CW'(C_RP - 2);
            pend_valid <= 1'b0;
          end else if (pend_ready) begin
            state      <= burst_state(pend_cmd);
            beat       <= '0;
            pend_valid <= 1'b0;
          end
        end
        ST_READING, ST_WRITING: begin
          beat <= beat + 1'b1;
          if (is_pre && ras_ok && (state == ST_READING ? rtp_ok : wr_ok)) begin
            state      <= ST_PRECHARGING;
            timer      <= CW'(C_RP - 2);
            pend_valid <= 1'b0;
          end else if (burst_last) begin
            if (pend_ready) begin
              state      <= burst_state(pend_cmd);
              beat       <= '0;
              pend_valid <= 1'b0;
            end else begin
              state <= ST_ACTIVE;
            end
          end
        end
        ST_READING_APR, ST_WRITING_APR: begin
          if (!burst_done) beat <= beat + 1'b1;
          if (burst_done && ras_ok && (state == ST_READING_APR ? rtp_ok : wr_ok)) begin
            state <= ST_PRECHARGING;
            timer <= CW'(C_RP - 2);
          end
        end
        default: state <= ST_IDLE;
      endcase

      // A RD/WR is queued until its CAS latency has run out.
      if (is_col && (state == ST_ACTIVE || state == ST_READING || state == ST_WRITING)) begin
        pend_valid <= 1'b1;
        pend_cmd   <= cmd;
        pend_cnt   <= (cmd == CMD_RD || cmd == CMD_RDA) ? CW'(C_CL - 2) : CW'(C_CWL - 2);
      end
    end
  end

endmodule
