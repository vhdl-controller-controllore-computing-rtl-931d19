// Shared types and constants of the product/average controller.
//
// The controller reads an 8-bit command word, then a number of 8-bit data
// from one input port at a fixed pace, and returns either the product of the
// first two data or the average of all of them as a 16-bit result. This
// package holds the widths, the layout of the command word, the FSM state
// type and the bundle of control strobes the FSM drives into the datapath.
// Widths and the command layout (op in bit 7, id in bits 6:5, count in bits
// 4:0) follow the original design; the struct and enum forms are this
// design's own.
package controllore_pkg;

  localparam int unsigned DATA_W   = 8;   // DATA_IN width
  localparam int unsigned CODE_W   = 8;   // CODE width
  localparam int unsigned RESULT_W = 16;  // RESULT width (full product of two data)
  localparam int unsigned CID_W    = 2;   // command id field
  localparam int unsigned NUM_W    = 5;   // data-count field, also the data counter
  localparam int unsigned WAIT_W   = 2;   // pacing counter: wraps every 4 cycles

  // Command word, MSB first: op (1 = product, 0 = average), id, data count.
  typedef struct packed {
    logic             op;
    logic [CID_W-1:0] cid;
    logic [NUM_W-1:0] num_dati;
  } code_t;

  typedef enum logic [2:0] {
    S_IDLE,       // BUSY low, waiting for REQ
    S_READ_CODE,  // REQ high: CODE is loaded every cycle
    S_WAIT4,      // four cycles before a datum
    S_READ_DATO,  // one datum sampled
    S_WAIT4_BIS,  // four cycles after a datum
    S_FINE        // result loaded
  } state_t;

  // Strobes from the FSM to the rest of the design.
  typedef struct packed {
    logic busy;
    logic code_en;
    logic code_reset;
    logic c4_en;
    logic c4_reset;
    logic campiona;     // sample DATA_IN this cycle
    logic cdata_reset;
    logic result_en;
  } ctrl_t;

endpackage
