// Shared types and constants for the concurrent-error-detection (CED) circuits
// around the example burst-mode machine.
//
// The example machine has four primary inputs a, b, c, d and two outputs x, w.
// All asynchronous circuits in this design are written in a discrete-time
// delay model: every gate or delay element that the circuit needs is one
// flip-flop on a free-running time-step clock, so one clock tick stands for one
// gate delay. This is this design's own modelling choice; the circuits of the
// original method are clockless.
package ced_pkg;

  // Primary inputs of the example machine, in the column order of its flow
  // table (a is the leftmost bit of a table column such as 1010).
  typedef struct packed {
    logic a;
    logic b;
    logic c;
    logic d;
  } burst_in_t;

  // Outputs of the example machine, in the order the flow table prints them.
  typedef struct packed {
    logic x;
    logic w;
  } abmm_out_t;

  // Detection flags brought out by each CED method.
  typedef struct packed {
    logic g1;       // glue gate G1
    logic g2;       // glue gate G2
    logic hazard;   // hazard detection circuit output
    logic error;    // G3: the error indication
  } ced_flags_t;

  // Number of AND gates in each gate-level machine (width of its upset port).
  localparam int unsigned ORIG_NP  = 8;
  localparam int unsigned INVF_NP  = 12;
  localparam int unsigned BGEN_NP  = 15;
  localparam int unsigned TPF_NP   = 6;
  localparam int unsigned OPTD_NP  = 6;

  // State codes of the example machine (two feedback lines {Y1,Y0}).
  localparam logic [1:0] S0_CODE = 2'b00;
  localparam logic [1:0] S1_CODE = 2'b10;  // Y1 set
  localparam logic [1:0] S2_CODE = 2'b01;  // Y0 set

  // State codes of the inverter-free re-encoding {Y3,Y2,Y1,Y0}.
  localparam logic [3:0] S0_INVF = 4'b0011;
  localparam logic [3:0] S1_INVF = 4'b0110;
  localparam logic [3:0] S2_INVF = 4'b1001;

endpackage
