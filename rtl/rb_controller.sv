// Rollback and repair controller.
//
// Part one watches the five internal error signals of the chip, latched at
// the end of the cycle in which they occur: master/slave mismatch (CMP) and
// busIN parity request a rollback of two cycles; busOUT, busA and busB
// parity request one cycle. If the post-rollback counter (cycles since the
// last rollback) equals the requested distance, the rollback would restore
// exactly the state the previous rollback restored, so one more cycle is
// added. The distance, counted in normal execution cycles, is turned into a
// number of DWB entries by the select logic: a 4-bit shift register records
// which recent cycle slots were normal execution cycles that were not rolled
// back (a 1 is shifted in every normal cycle, the n most recent entries are
// cleared on a rollback of n). If more than four entries would be needed,
// if the rollback counter already holds three rollbacks in the current
// 16-cycle frame, or if rollback is not yet enabled after reset or a
// shutdown, the controller pulls the shutdown line instead. Otherwise it
// pulls the rollback line and arbitrates its amount on the rollback-amount
// lines (rb_arbiter), and drives its two repair pins with the busA/busB
// register-file parity errors it saw.
//
// Part two reads the lines in the following cycle. A pulled shutdown line
// makes the cycle a shutdown-trap cycle; else a pulled rollback line makes
// it a rollback cycle that clears rb_amt DWB entries everywhere. In a
// rollback cycle the repair pins of both chips decide the repair: a busA
// error seen by exactly one chip is repaired first; a busB error is repaired
// only if neither chip saw a busA error; an error seen by both chips on the
// same bus is not repaired. The chip without the error sends. The rollback
// bit is set by every rollback and cleared by the clear-rollback-bit
// instructions.
//
// Pins (rb_n, amt_n, shut_n) are active low, as the open-drain lines with
// pull-ups; *_o is this chip's drive and *_i the wired value. The 4-bit
// frame counter, 2-bit rollback counter, post-rollback counter, 3-bit enable
// counter and the select/encode path follow the controller block diagram;
// the enable counter's count of four cycles, the counter widths not printed
// and the single-clock-per-cycle timing are this design's choices.
//
// When the amount lines are looped back through a wired-AND outside, lint
// reports arb_drive as circular logic. That path is the Futurebus
// arbitration settling on the shared lines: bit i of the drive depends only
// on line bits above i, so there is no loop at the bit level and the lines
// settle in at most three steps. The warning stands for that reason.
module rb_controller #(
  parameter int DEPTH = 4,
  parameter int AW    = 3
) (
  input  logic          clk,
  input  logic          rst_n,
  // this cycle
  input  logic          normal_cycle,
  input  logic          err_cmp,
  input  logic          err_par_in,
  input  logic          err_par_out,
  input  logic          err_par_a,
  input  logic          err_par_b,
  input  logic          clr_rbit,
  // rollback-domain pins
  output logic          rb_n_o,
  output logic [AW-1:0] amt_n_o,
  output logic          shut_n_o,
  output logic [1:0]    rep_o,
  input  logic          rb_n_i,
  input  logic [AW-1:0] amt_n_i,
  input  logic          shut_n_i,
  input  logic [1:0]    rep_i,
  // to the chip
  output logic          rb_cycle,
  output logic [AW-1:0] rb_amt,
  output logic          shut_cycle,
  output logic          repair,
  output logic          rep_bus_b,
  output logic          rep_send,
  output logic          rollback_bit
);

  logic [4:0]       err_q;       // {cmp, par_in, par_out, par_a, par_b}
  logic [DEPTH-1:0] hist;        // bit 0 = most recent slot
  logic [2:0]       post_cnt;    // saturates at 4
  logic [3:0]       frame_cnt;
  logic [1:0]       rb_cnt;
  logic [2:0]       en_cnt;
  logic             rbit_q;

  logic [AW-1:0] req_d, req_ext, entries, line_amt, arb_drive;
  logic          any_err, enabled, shut_req, rb_req;

  assign any_err = |err_q;
  assign enabled = (en_cnt >= 3'd4);

  always_comb begin
    if (err_q[4] || err_q[3])      req_d = AW'(2);
    else if (|err_q[2:0])          req_d = AW'(1);
    else                           req_d = '0;
    req_ext = (any_err && AW'(post_cnt) == req_d) ? req_d + AW'(1) : req_d;
  end

  // Select and encode: entries = position of the req_ext-th normal slot.
  always_comb begin
    int cnt;
    entries = '1;
    cnt     = 0;
    for (int i = 0; i < DEPTH; i++) begin
      if (hist[i]) cnt++;
      if (cnt == int'(req_ext) && entries == '1) entries = AW'(i + 1);
    end
  end

  assign shut_req = any_err && (!enabled || rb_cnt == 2'd3 || int'(entries) > DEPTH);
  assign rb_req   = any_err && !shut_req;

  assign line_amt = ~amt_n_i;

  rb_arbiter #(.W(AW)) u_arb (
    .req   (rb_req),
    .amt   (entries),
    .line  (line_amt),
    .drive (arb_drive)
  );

  assign rb_n_o   = !rb_req;
  assign amt_n_o  = ~arb_drive;
  assign shut_n_o = !shut_req;
  assign rep_o    = {err_q[0], err_q[1]};   // {busB, busA}

  assign shut_cycle = !shut_n_i;
  assign rb_cycle   = !rb_n_i && shut_n_i;
  assign rb_amt     = (int'(line_amt) > DEPTH) ? AW'(DEPTH) : line_amt;

  // Repair decision from own and other chip's repair pins.
  always_comb begin
    logic own_a, own_b, oth_a, oth_b, rep_a, rep_b;
    own_a = err_q[1];
    own_b = err_q[0];
    oth_a = rep_i[0];
    oth_b = rep_i[1];
    rep_a = own_a ^ oth_a;
    rep_b = !(own_a || oth_a) && (own_b ^ oth_b);
    repair    = rb_cycle && (rep_a || rep_b);
    rep_bus_b = !rep_a;
    rep_send  = rep_a ? !own_a : !own_b;
  end

  assign rollback_bit = rbit_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_q     <= '0;
      hist      <= '0;
      post_cnt  <= 3'd4;
      frame_cnt <= '0;
      rb_cnt    <= '0;
      en_cnt    <= '0;
      rbit_q    <= 1'b0;
    end else begin
      frame_cnt <= frame_cnt + 4'd1;
      if (shut_cycle) begin
        err_q     <= '0;
        hist      <= {hist[DEPTH-2:0], 1'b0};
        post_cnt  <= 3'd4;
        frame_cnt <= '0;
        rb_cnt    <= '0;
        en_cnt    <= '0;
      end else if (rb_cycle) begin
        err_q    <= '0;
        for (int i = 0; i < DEPTH; i++)
          if (i < int'(rb_amt)) hist[i] <= 1'b0;
        post_cnt <= '0;
        rbit_q   <= 1'b1;
        if (frame_cnt == 4'd15)   rb_cnt <= '0;
        else if (rb_cnt != 2'd3)  rb_cnt <= rb_cnt + 2'd1;
      end else begin
        err_q    <= {err_cmp, err_par_in, err_par_out, err_par_a, err_par_b};
        hist     <= {hist[DEPTH-2:0], normal_cycle};
        if (post_cnt != 3'd4) post_cnt <= post_cnt + 3'd1;
        if (en_cnt != 3'd4)   en_cnt   <= en_cnt + 3'd1;
        if (frame_cnt == 4'd15) rb_cnt <= '0;
        if (clr_rbit) rbit_q <= 1'b0;
      end
    end
  end

endmodule
