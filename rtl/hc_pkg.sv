// hc_pkg: types shared by the hypercube router.
//
// A serial link carries one bit per clock (one "bit time") plus a valid flag. A frame is a run
// of consecutive valid cycles, least significant bit first. The phase type lists the six steps
// of one loop iteration of the routing algorithm plus the idle and finishing states used by the
// controller; the step numbering follows the algorithm, the encoding is this design's own.
package hc_pkg;

  typedef struct packed {
    logic v;   // bit is valid this cycle
    logic b;   // the bit
  } ser_t;

  typedef enum logic [3:0] {
    PH_IDLE  = 4'd0,
    PH_XCHG  = 4'd1,   // step 1: messages cross dimension i
    PH_ENUM2 = 4'd2,   // step 2: enumerate nodes holding two messages
    PH_PACK3 = 4'd3,   // step 3: pack the second messages
    PH_ENUM0 = 4'd4,   // step 4: enumerate nodes holding no message
    PH_PACK5 = 4'd5,   // step 5: empty nodes pack their own address
    PH_RDV   = 4'd6,   // step 6: step 5 run backwards (rendezvous)
    PH_DONE  = 4'd7
  } phase_e;

  localparam ser_t SER_IDLE = '{v: 1'b0, b: 1'b0};

endpackage
