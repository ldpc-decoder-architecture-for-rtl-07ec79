// ldpc_ctrl: schedule of the two interleaved frames.
//
// A free-running phase counter repeats a period of 2*nsub cycles (8 for the
// codes with four sub-iterations) or 2*nsub+1 cycles (7 for the code with
// three, one idle bubble cycle). Frame slot 0 issues its sub-iterations in
// phases 0..nsub-1, slot 1 in phases nsub..2*nsub-1. Each pass over all
// sub-iterations is one flooding iteration: the VNs of a slot accumulate one
// frame's C2V messages while sending out the other slot's V2C messages.
//
// During a pass the check nodes also XOR the hard decisions held at the start
// of the pass; this controller ORs those syndrome bits over the pass. The
// last cycle before a slot's window (phase period-1 for slot 0, nsub-1 for
// slot 1) is its turn-over point: the previous pass has left the check nodes
// by then. If the syndrome was clean, or max_iter iterations have been done,
// the frame is retired (out_valid for one cycle) and the slot may take a new
// frame in the same cycle (in_ready high exactly then). Otherwise the
// iteration count rises and the slot runs another pass.
//
// Interface timing: in_valid must stay high, with its data, until in_ready.
// nsub and max_iter may only change while both slots are empty. The phase
// scheme follows the design's pipeline diagram; the syndrome-based early
// termination and the handshake are this implementation's choices.
module ldpc_ctrl
  import ldpc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [2:0]      nsub,        // 3 or 4
  input  logic [ITW-1:0]  max_iter,
  // frame input handshake
  input  logic            in_valid,
  output logic            in_ready,
  output logic            load,
  output logic            load_frame,
  // stage 1 control
  output pctl_t           prep,
  output logic            prep_latch_hd,
  output logic            bubble,
  // syndrome from the registered check node outputs
  input  pctl_t           cn_ctl,
  input  logic            cn_synd,
  // retirement
  output logic            out_valid,
  output logic            out_frame,
  output logic [ITW-1:0]  out_iter,
  output logic            out_ok
);

  logic [3:0]     phase, period, nsub_w;
  logic [1:0]     busy;
  logic [1:0]     fail;
  logic [ITW-1:0] pass [2];

  logic           turn;       // this cycle is a turn-over point
  logic           tslot;      // ... for this slot
  logic           retire;

  always_comb begin
    nsub_w = 4'(nsub);
    period = (nsub == 3'd4) ? 4'd8 : 4'd7;
    // stage 1 issue
    prep   = '0;
    bubble = 1'b0;
    if (phase < nsub_w) begin
      prep.frame = 1'b0;
      prep.sub   = SUBW'(phase);
    end else if (phase < 2 * nsub_w) begin
      prep.frame = 1'b1;
      prep.sub   = SUBW'(phase - nsub_w);
    end else begin
      bubble     = 1'b1;
    end
    prep.valid    = !bubble && busy[prep.frame];
    prep.first    = (pass[prep.frame] == '0);
    prep_latch_hd = prep.valid && (prep.sub == '0);
    // turn-over
    turn  = (phase == period - 4'd1) || (phase == nsub_w - 4'd1);
    tslot = (phase == nsub_w - 4'd1);
    retire    = turn && busy[tslot] && (!fail[tslot] || pass[tslot] == max_iter);
    in_ready  = turn && (!busy[tslot] || retire);
    load      = in_ready && in_valid;
    load_frame = tslot;
    out_valid = retire;
    out_frame = tslot;
    out_iter  = pass[tslot];
    out_ok    = !fail[tslot];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      busy  <= '0;
      fail  <= '0;
      pass[0] <= '0;
      pass[1] <= '0;
    end else begin
      phase <= (phase == period - 4'd1) ? '0 : phase + 4'd1;
      if (cn_ctl.valid) begin
        if (cn_ctl.sub == '0) fail[cn_ctl.frame] <= cn_synd;
        else                  fail[cn_ctl.frame] <= fail[cn_ctl.frame] | cn_synd;
      end
      if (turn) begin
        if (load) begin
          busy[tslot] <= 1'b1;
          pass[tslot] <= '0;
        end else if (retire) begin
          busy[tslot] <= 1'b0;
        end else if (busy[tslot]) begin
          pass[tslot] <= pass[tslot] + 1'b1;
        end
      end
    end
  end

  // handshake rule: an offered frame is held until taken
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           in_valid && !in_ready |=> in_valid);
  a_nsub: assert property (@(posedge clk) disable iff (!rst_n)
                           nsub == 3'd3 || nsub == 3'd4);

endmodule
