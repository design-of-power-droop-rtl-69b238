// lbist_pkg: types and constants shared by the scan-based logic BIST.
//
// weight_e  - signal probability that the AND/OR gate tree gives a CUT
//             primary input (0.5 = plain LFSR stage, 0.25/0.125 = one or two
//             cascaded AND gates, 0.75/0.875 = one or two cascaded OR gates).
// scan_op_e - what the scan cells do in a clock cycle.
// bist_ctl_t - the control bundle the BIST controller drives.
package lbist_pkg;

  typedef enum logic [2:0] {
    W_HALF     = 3'd0,   // 1 stage,        P(1) = 1/2
    W_QUARTER  = 3'd1,   // AND of 2 stages, P(1) = 1/4
    W_EIGHTH   = 3'd2,   // AND of 3 stages, P(1) = 1/8
    W_3QUARTER = 3'd3,   // OR of 2 stages,  P(1) = 3/4
    W_7EIGHTH  = 3'd4    // OR of 3 stages,  P(1) = 7/8
  } weight_e;

  typedef enum logic [2:0] {
    SC_HOLD    = 3'd0,   // both flops keep their value
    SC_FUNC    = 3'd1,   // normal mode: shift and hold flop load d
    SC_SHIFT   = 3'd2,   // shift flops shift, hold flops keep the test vector
    SC_UPDATE  = 3'd3,   // hold flops take the newly shifted vector
    SC_CAPTURE = 3'd4    // shift flops take the logic response, hold flops keep
  } scan_op_e;

  typedef struct packed {
    logic     test_mode;   // input multiplexer select: 1 = TPG pattern
    scan_op_e scan_op;     // scan cell operation
    logic     tpg_load;    // reload the LFSR seed
    logic     tpg_en;      // step the LFSR
    logic     pi_load;     // load the CUT primary-input register
    logic     misr_clear;  // clear the signature
    logic     misr_en;     // compact this cycle's scan-out
    logic     tra_clear;   // forget the previous pass/fail result
    logic     tra_check;   // compare signature with golden now
    logic     busy;        // a test session is running
    logic     done;        // a test session has finished
  } bist_ctl_t;

endpackage
