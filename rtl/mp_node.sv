// Self-checking, self-repairing computing node built from two Mirror
// Processors.
//
// Two identical mp_chip instances run in lockstep from the same clock and
// reset. The one with master_pin high drives the external bus; the other,
// the slave, drives nothing and checks every cycle that the master's bus
// values and state signature equal its own. Both read the same memory, so
// both see the same instructions and load data. The open-drain rollback,
// rollback-amount and shutdown lines of the rollback domain are modelled as
// wired-AND of the active-low drivers of both chips and of the rest of the
// domain (ext_*_n_i, e.g. a memory with error-detecting code), so all
// modules see the same rollback in the same cycle. The four repair pins are
// cross-connected: each chip reads the other's busA/busB parity results.
// During state repair the data phase of the bus is driven by whichever chip
// sends the repaired value; otherwise it carries the master's store data or
// the memory's read data.
//
// The memory itself (with parity and its own delayed write buffer for
// stores) is outside the node: its address, strobes and data are ports, and
// the wired rollback lines are brought out so it can roll back with the
// processors. The chip's clock-phase generator and pad drivers are not
// modelled; one clock edge is one processor cycle.
//
// Lint reports the rollback-amount lines as circular logic: each chip's
// amount drive depends on the wired lines it helps drive. This is the
// Futurebus arbitration settling; bit i of a drive depends only on line bits
// above i, so there is no loop at the bit level and the lines settle to the
// largest requested amount within one evaluation.
module mp_node
  import mp_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  // memory
  output logic [32:0]     mem_addr_o,
  output logic            mem_rd_o,
  output logic            mem_wr_o,
  output logic [32:0]     mem_wdata_o,
  input  logic [32:0]     mem_rdata_i,
  // rest of the rollback domain (active low, released = 1)
  input  logic            ext_rb_n_i,
  input  logic [RB_W-1:0] ext_amt_n_i,
  input  logic            ext_shut_n_i,
  output logic            rb_n_o,
  output logic [RB_W-1:0] amt_n_o,
  output logic            shut_n_o,
  // status
  output logic            rb_cycle_o,
  output logic            shut_cycle_o,
  output logic            repair_o,
  output logic [1:0]      rep_recv_o,    // {slave, master} received a repair
  output logic [1:0]      rollback_bit_o,// {slave, master}
  output mp_state_e       state_o,
  output logic [31:0]     pc_o
);

  localparam int N = 2;   // index 0: master, 1: slave

  logic [32:0]      addr_o   [N];
  logic [32:0]      data_o   [N];
  logic             rd_o     [N];
  logic             wr_o     [N];
  logic             ddrv     [N];
  logic             mode_o   [N];
  logic [SIG_W-1:0] sig_o    [N];
  logic             rbn      [N];
  logic [RB_W-1:0]  amtn     [N];
  logic             shutn    [N];
  logic [1:0]       rep      [N];
  logic             rbc      [N];
  logic             shc      [N];
  logic             repc     [N];
  logic             recv     [N];
  logic             rbit     [N];
  mp_state_e        st       [N];
  logic [31:0]      pcs      [N];

  logic [32:0] data_bus;

  // Wired-AND open-drain lines.
  assign rb_n_o   = rbn[0] & rbn[1] & ext_rb_n_i;
  assign amt_n_o  = amtn[0] & amtn[1] & ext_amt_n_i;
  assign shut_n_o = shutn[0] & shutn[1] & ext_shut_n_i;

  // Data phase of the bus: a driving chip, else the memory.
  always_comb begin
    if (ddrv[0])      data_bus = data_o[0];
    else if (ddrv[1]) data_bus = data_o[1];
    else              data_bus = mem_rdata_i;
  end

  for (genvar k = 0; k < N; k++) begin : g_chip
    mp_chip u_mp (
      .clk            (clk),
      .rst_n          (rst_n),
      .master_pin     (k == 0),
      .addr_o         (addr_o[k]),
      .mem_rd_o       (rd_o[k]),
      .mem_wr_o       (wr_o[k]),
      .data_o         (data_o[k]),
      .data_drive_o   (ddrv[k]),
      .mode_o         (mode_o[k]),
      .sig_o          (sig_o[k]),
      .addr_i         (addr_o[0]),
      .mem_rd_i       (rd_o[0]),
      .mem_wr_i       (wr_o[0]),
      .data_i         (data_bus),
      .mode_i         (mode_o[0]),
      .sig_i          (sig_o[0]),
      .rb_n_o         (rbn[k]),
      .amt_n_o        (amtn[k]),
      .shut_n_o       (shutn[k]),
      .rep_o          (rep[k]),
      .rb_n_i         (rb_n_o),
      .amt_n_i        (amt_n_o),
      .shut_n_i       (shut_n_o),
      .rep_i          (rep[N-1-k]),
      .rb_cycle_o     (rbc[k]),
      .shut_cycle_o   (shc[k]),
      .repair_o       (repc[k]),
      .rep_recv_o     (recv[k]),
      .rollback_bit_o (rbit[k]),
      .state_o        (st[k]),
      .pc_o           (pcs[k])
    );
  end

  assign mem_addr_o     = addr_o[0];
  assign mem_rd_o       = rd_o[0];
  assign mem_wr_o       = wr_o[0];
  assign mem_wdata_o    = data_o[0];
  assign rb_cycle_o     = rbc[0];
  assign shut_cycle_o   = shc[0];
  assign repair_o       = repc[0] | repc[1];
  assign rep_recv_o     = {recv[1], recv[0]};
  assign rollback_bit_o = {rbit[1], rbit[0]};
  assign state_o        = st[0];
  assign pc_o           = pcs[0];

endmodule
