// cdo_top: the CDO pricing accelerator, NUM_CORES independent CDO cores side
// by side.
//
// Time steps and scenarios of a CDO pricing problem are independent, so the
// design gains speed by replication: each core prices one time step (all of
// its scenarios) and then the next, and the host spreads the work over the
// cores round-robin, instrument by instrument, through each core's In FIFO,
// collecting the tranche losses from each core's Out FIFO. Every core has its
// own 32-bit valid/ready input and output channel, as point-to-point host
// links provide. Ten cores is the replication the document reports for its
// mid-size FPGA; everything runs on one clock here (the document runs the
// cores at twice the host clock across asynchronous links).
module cdo_top
  import cdo_pkg::*;
#(
  parameter int unsigned NUM_CORES    = 10,
  parameter int unsigned NUM_TRANCHES = 6,
  parameter int unsigned FIFO_DEPTH   = 4096
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid  [NUM_CORES],
  output logic         in_ready  [NUM_CORES],
  input  word_t        in_data   [NUM_CORES],
  output logic         out_valid [NUM_CORES],
  input  logic         out_ready [NUM_CORES],
  output word_t        out_data  [NUM_CORES],
  output core_events_t events    [NUM_CORES],
  output logic [$clog2(FIFO_DEPTH+2):0] entries [NUM_CORES]
);
  for (genvar c = 0; c < NUM_CORES; c++) begin : g_core
    cdo_core #(.NUM_TRANCHES(NUM_TRANCHES), .FIFO_DEPTH(FIFO_DEPTH)) u_core (
      .clk, .rst_n,
      .in_valid(in_valid[c]), .in_ready(in_ready[c]), .in_data(in_data[c]),
      .out_valid(out_valid[c]), .out_ready(out_ready[c]), .out_data(out_data[c]),
      .events(events[c]), .entries(entries[c]));
  end
endmodule
