// numa_pkg: configuration constants and shared types of the 3-D NUMA L2 memory stack.
//
// The stack is a logic die (LD) with N network-interface ports and up to MAX_MD identical
// memory dies (MDs) stacked on it. Memory is word-level interleaved (WLI) over C parallel
// memory cones: consecutive 8-byte words go to consecutive cones, so a 64-byte load becomes
// eight one-word chunks served in parallel. Inside a cone the dies are chained by pipeline
// registers; a word belongs to the die whose index matches the die field of its address.
//
// From the paper: C = 8 cones, 8-byte words, up to eight dies holding 4 MB in all (so
// 8192 words per cone per die), loads and stores of several sizes, a transaction limit MOT.
// Own choices: N = 4 ports, MOT = 8 entries per read buffer, 8-bit transaction IDs, the
// address map (cone = word address bits [2:0], row = bits [15:3], die = bits [18:16]),
// word-granular stores, and every chunk (load or store) returning a response chunk.
package numa_pkg;

  // ---- configuration -------------------------------------------------------------
  localparam int unsigned N_NI       = 4;     // NoC interfaces (own choice)
  localparam int unsigned N_CONE     = 8;     // parallel memory cones (C)
  localparam int unsigned MOT        = 8;     // outstanding transactions per read buffer
  localparam int unsigned MAX_MD     = 8;     // memory dies addressable (4 MB stack)
  localparam int unsigned DATA_W     = 64;    // one chunk = one 8-byte word
  localparam int unsigned BANK_WORDS = 8192;  // words per cone per die (64 KB)
  localparam int unsigned TID_W      = 8;     // transaction ID carried by a packet
  localparam int unsigned TSV_GROUP  = 25;    // signals per TSV repair group (+1 spare)

  // ---- derived widths ------------------------------------------------------------
  localparam int unsigned NI_W    = (N_NI > 1) ? $clog2(N_NI) : 1;
  localparam int unsigned CONE_W  = $clog2(N_CONE);
  localparam int unsigned TAG_W   = $clog2(MOT);
  localparam int unsigned MD_W    = $clog2(MAX_MD);
  localparam int unsigned ROW_W   = $clog2(BANK_WORDS);
  localparam int unsigned WADDR_W = CONE_W + ROW_W + MD_W;   // word address
  localparam int unsigned BADDR_W = WADDR_W + 3;             // byte address
  localparam int unsigned LEN_W   = CONE_W;                  // packet length - 1, in words
  localparam int unsigned JOIN_FIFO_DEPTH = N_NI * MOT;      // see md_join

  typedef enum logic {
    OP_LOAD  = 1'b0,
    OP_STORE = 1'b1
  } op_e;

  // Request packet as handed over by an NI: LEN+1 consecutive words from ADDR.
  typedef struct packed {
    op_e                                 op;
    logic [TID_W-1:0]                    tid;
    logic [BADDR_W-1:0]                  addr;
    logic [LEN_W-1:0]                    len_m1;
    logic [N_CONE-1:0][DATA_W-1:0]       wdata;   // wdata[j] = word j of the packet
  } req_pkt_t;

  // One response flit towards an NI; a load returns len_m1+1 flits, a store one.
  typedef struct packed {
    op_e                 op;
    logic [TID_W-1:0]    tid;
    logic [LEN_W-1:0]    idx;
    logic                last;
    logic [DATA_W-1:0]   data;
  } rsp_flit_t;

  // Request chunk travelling up one cone of the memory pipeline.
  typedef struct packed {
    logic [NI_W-1:0]     ni;      // return address: which read buffer
    logic [TAG_W-1:0]    tag;     // read-buffer entry
    op_e                 op;
    logic [MD_W-1:0]     md;      // destination die
    logic [ROW_W-1:0]    row;     // word within that die's bank
    logic [DATA_W-1:0]   wdata;
  } req_chunk_t;

  // Response chunk travelling down one cone.
  typedef struct packed {
    logic [NI_W-1:0]     ni;
    logic [TAG_W-1:0]    tag;
    logic [DATA_W-1:0]   rdata;
  } rsp_chunk_t;

  // Header kept in the read buffer so it need not travel through the memory pipeline.
  typedef struct packed {
    op_e                 op;
    logic [TID_W-1:0]    tid;
    logic [LEN_W-1:0]    len_m1;
    logic [CONE_W-1:0]   start;   // cone of word 0
  } rb_hdr_t;

  // Cones touched by a packet of len_m1+1 words starting at cone `start`.
  function automatic logic [N_CONE-1:0] cone_mask(input logic [CONE_W-1:0] start,
                                                  input logic [LEN_W-1:0]  len_m1);
    logic [N_CONE-1:0] m;
    m = '0;
    for (int j = 0; j < N_CONE; j++)
      if (j <= int'(len_m1)) m[CONE_W'(int'(start) + j)] = 1'b1;
    return m;
  endfunction

endpackage
