// Shared types and constants of the local-memory transactional LDS.
//
// The sizes follow the baseline compute unit the design extends: 32 LDS banks
// of 2 KB (512 words of 4 bytes), wavefronts of 64 work-items, work-groups of
// 256 work-items (4 wavefronts), 8-bit Bloom signatures per work-item and bank.
// The enums (bank outcome, transaction mode, LDS command) are this design's own
// encodings; the document names the states but gives no encoding.
package localtm_pkg;

  localparam int unsigned LTM_NUM_BANKS  = 32;  // LDS banks per compute unit
  localparam int unsigned LTM_BANK_WORDS = 512; // 2 KB bank / 4-byte word
  localparam int unsigned LTM_WF_SIZE    = 64;   // work-items per wavefront
  localparam int unsigned LTM_NUM_WF     = 4;    // wavefronts per work-group
  localparam int unsigned LTM_WG_SIZE    = 256;  // work-items per work-group
  localparam int unsigned LTM_BLOOM_BITS = 8;    // bits per Bloom signature

  // Outcome of the fast (Bloom) conflict detection stage.
  typedef enum logic [1:0] {
    BLOOM_NEW      = 2'd0,  // no filter positive: first access
    BLOOM_OWN      = 2'd1,  // only the requester's own filter positive
    BLOOM_CONFLICT = 2'd2   // another work-item's filter positive
  } bloom_res_e;

  // Final outcome reported by a bank for one access.
  typedef enum logic [2:0] {
    ACC_PLAIN      = 3'd0,  // non-transactional access
    ACC_NEW        = 3'd1,  // backup made, ownership taken
    ACC_OWN        = 3'd2,  // owner record matched: no action
    ACC_FALSE_OWN  = 3'd3,  // own filter positive but owner differed: backup made
    ACC_CONFLICT   = 3'd4   // conflict: access not performed
  } acc_res_e;

  // Operations a bank accepts.
  typedef enum logic [1:0] {
    BOP_ACCESS  = 2'd0,  // one work-item access (transactional or plain)
    BOP_RESTORE = 2'd1,  // restore + clear the shadow entries of selected work-items
    BOP_CLEAR   = 2'd2   // clear the shadow entries of selected work-items (commit)
  } bank_op_e;

  // Transactional execution mode of a wavefront.
  typedef enum logic [1:0] {
    MODE_NORMAL    = 2'd0,
    MODE_TX        = 2'd1,
    MODE_WF_SERIAL = 2'd2,
    MODE_WG_SERIAL = 2'd3
  } tx_mode_e;

  // Commands from the compute unit to the LDS / TM unit.
  typedef enum logic [1:0] {
    CMD_TX_BEGIN  = 2'd0,
    CMD_TX_COMMIT = 2'd1,
    CMD_LDS_READ  = 2'd2,
    CMD_LDS_WRITE = 2'd3
  } cmd_e;

endpackage
