// msg_pkg: types and constants shared by the blocks of the register-mapped
// message subsystem.
//
// A machine word is 64 bits. A protected pointer packs three fields into a
// word: a permission code, a segment length and a 54-bit address. The three
// fields are what the design relies on (permissions are checked and mutated
// by the network output unit, the address is translated by the GTLB); their
// bit positions and the permission codes are this design's choice, taken
// from the 64-bit pointer layout of the M-Machine family.
//
// A physical node ID is an (x, y, z) coordinate in a 3-D mesh. A GTLB entry
// holds the fields of the global translation entry: virtual page number,
// starting node, virtual page length, local pages per node and the region
// extent as log2 of the x, y and z node counts.
package msg_pkg;

  localparam int unsigned WORD_W    = 64;
  localparam int unsigned ADDR_W    = 54;   // pointer address field
  localparam int unsigned PLEN_W    = 6;    // pointer segment length field
  localparam int unsigned PERM_W    = 4;    // pointer permission field
  localparam int unsigned COORD_W   = 5;    // bits per mesh coordinate
  localparam int unsigned PAGE_BITS = 12;   // log2 of the page size in bytes
  localparam int unsigned VPN_W     = ADDR_W - PAGE_BITS;
  localparam int unsigned LOG_W     = 3;    // width of a log2 extent field

  // MC registers: two banks of 10 user registers plus 2 system registers
  localparam int unsigned MC_BANKS     = 2;
  localparam int unsigned MC_USER_REGS = 10;
  localparam int unsigned MC_REGS      = 12;
  localparam int unsigned LEN_W        = 4;   // SEND length field, 0..12
  localparam int unsigned NUM_CC       = 4;   // condition-code registers
  localparam int unsigned CC_W         = 2;
  localparam int unsigned HDR_WORDS    = 4;   // dispatchIP, count, senderID, dest

  typedef logic [WORD_W-1:0] word_t;

  typedef enum logic [PERM_W-1:0] {
    PERM_NONE     = 4'd0,
    PERM_RO       = 4'd1,
    PERM_RW       = 4'd2,
    PERM_EXEC     = 4'd3,
    PERM_EXEC_MSG = 4'd4
  } perm_e;

  typedef struct packed {
    logic [PERM_W-1:0] perm;
    logic [PLEN_W-1:0] seglen;
    logic [ADDR_W-1:0] addr;
  } ptr_t;

  typedef struct packed {
    logic [COORD_W-1:0] z;
    logic [COORD_W-1:0] y;
    logic [COORD_W-1:0] x;
  } node_t;

  // Error value returned by an R_body read that has no word to give
  localparam word_t ERR_VAL = 64'hFFF0_0000_0000_0BAD;

  // One SEND operation, as presented by the issue stage
  typedef struct packed {
    logic              bank;       // MC bank 0 or 1
    logic [LEN_W-1:0]  len;        // number of MC registers, MC#0..MC#len-1
    logic              prio;       // network priority 0 (user) or 1 (system)
    logic              sys;        // issued by a system-level thread
    logic              nothrottle; // system SEND variant that bypasses the OMBC
    logic [CC_W-1:0]   ccreg;      // condition code target
    logic              dip_isptr;  // pointer tag of the dispatchIP operand
    word_t             dip;        // dispatch instruction pointer
    logic              dest_isptr; // pointer tag of the destination operand
    word_t             dest;       // destination virtual address
  } send_req_t;

  typedef struct packed {
    logic               valid;
    logic [VPN_W-1:0]   vpn;        // first virtual page of the region
    node_t              start;      // starting node of the prism
    logic [VPN_W-1:0]   vlen;       // number of virtual pages in the region
    logic [LOG_W-1:0]   log_lppn;   // log2 local pages per node
    logic [LOG_W-1:0]   log_x;      // region extent, log2 nodes along x
    logic [LOG_W-1:0]   log_y;
    logic [LOG_W-1:0]   log_z;
  } gtlb_entry_t;

endpackage
