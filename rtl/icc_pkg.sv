// icc_pkg: types and constants shared by the 16-core inter-core communication chip.
//
// The chip is a 3 x 6 mesh of tiles: sixteen processor cores (PCores) and two memory
// cores (MCores), split into two clusters of eight PCores and one MCore. Cluster 1 holds
// mesh columns 0-2 and cluster 2 columns 3-5; each MCore sits in the middle of its
// cluster (column 1 or 4, row 1). PCores are numbered row by row inside a cluster, so
// PCore 1 is the top-left tile and PCore 16 the bottom-right tile of the chip.
//
// Network packets are made of 34-bit flits (head flag, tail flag, 32-bit data). A head
// flit carries the packet type, destination and source mesh coordinates and a shared
// memory address; a packet that carries a data word has one more flit, the tail, whose
// data field is the word. The packet types, the flit layout, the instruction encoding
// of the PCore and the DMA command format are all this design's own choices: the
// original only names the mechanisms (XY wormhole routing, shared memory, mailbox,
// DMA memory interface).
package icc_pkg;

  localparam int unsigned DATA_W     = 32;  // data_in[31:0] / data_out[31:0]
  localparam int unsigned MESH_ROWS  = 3;   // 3 x 6 mesh
  localparam int unsigned MESH_COLS  = 6;
  localparam int unsigned N_NODES    = MESH_ROWS * MESH_COLS;
  localparam int unsigned N_CLUSTERS = 2;
  localparam int unsigned PC_PER_CL  = 8;   // eight PCores per cluster
  localparam int unsigned N_PCORES   = N_CLUSTERS * PC_PER_CL;
  localparam int unsigned CL_COLS    = MESH_COLS / N_CLUSTERS;

  // Shared memory: four banks per MCore, 32 words each (5-bit word address).
  localparam int unsigned SHM_BANKS    = 4;
  localparam int unsigned SHM_WORD_AW  = 5;
  localparam int unsigned SHM_AW       = 7;  // {bank[1:0], word[4:0]}

  // Mailbox sources: the eight PCores of the cluster plus the memory interface (DMA).
  localparam int unsigned MB_SRCS   = PC_PER_CL + 1;
  localparam int unsigned MB_DMA_ID = PC_PER_CL;

  localparam int unsigned XW = 3;  // mesh column coordinate width
  localparam int unsigned YW = 2;  // mesh row coordinate width

  typedef logic [DATA_W-1:0] word_t;
  typedef logic [SHM_AW-1:0] shm_addr_t;

  typedef struct packed {
    logic  head;
    logic  tail;
    word_t data;
  } flit_t;

  typedef enum logic [1:0] {
    PT_MSG  = 2'd0,  // PCore-to-PCore message: head + data tail
    PT_WR   = 2'd1,  // remote shared-memory write: head(addr) + data tail
    PT_RD   = 2'd2,  // remote shared-memory read request: single flit
    PT_RESP = 2'd3   // read response from an MCore: head + data tail
  } ptype_e;

  // Head flit data field.
  typedef struct packed {
    ptype_e          ptype;   // [31:30]
    logic [XW-1:0]   dst_x;   // [29:27]
    logic [YW-1:0]   dst_y;   // [26:25]
    logic [XW-1:0]   src_x;   // [24:22]
    logic [YW-1:0]   src_y;   // [21:20]
    logic [12:0]     rsvd;    // [19:7]
    shm_addr_t       addr;    // [6:0]
  } head_t;

  // Router port numbering.
  localparam int unsigned P_LOCAL = 0;
  localparam int unsigned P_NORTH = 1;  // row - 1
  localparam int unsigned P_EAST  = 2;  // column + 1
  localparam int unsigned P_SOUTH = 3;  // row + 1
  localparam int unsigned P_WEST  = 4;  // column - 1
  localparam int unsigned N_PORTS = 5;

  // DMA (memory interface) command: copy len words from the issuing cluster's shared
  // memory to the other cluster's shared memory, then set mailbox bit MB_DMA_ID of
  // PCore `notify` in the destination cluster.
  typedef struct packed {
    shm_addr_t  src_addr;
    shm_addr_t  dst_addr;
    logic [4:0] len;      // 1..31 words; 0 is treated as 1
    logic [2:0] notify;
  } dma_cmd_t;

  // PCore instruction word: op[31:28] rd[27:25] rs[24:22] imm[21:0].
  typedef enum logic [3:0] {
    OP_HALT = 4'd0,   // stop
    OP_LI   = 4'd1,   // rd = zero-extended imm
    OP_ADDI = 4'd2,   // rd = rd + sign-extended imm[15:0]
    OP_IN   = 4'd3,   // rd = word from the external input stream (waits)
    OP_OUT  = 4'd4,   // external output stream <= rd (waits)
    OP_LD   = 4'd5,   // rd = mem[rs + imm[7:0]]  (address bit 7 set: shared memory)
    OP_ST   = 4'd6,   // mem[rs + imm[7:0]] = rd
    OP_SYNC = 4'd7,   // set own bit in the mailbox of cluster PCore imm[2:0]
    OP_WAIT = 4'd8,   // wait for mailbox bit imm[3:0], then clear it
    OP_SEND = 4'd9,   // message rd to tile (x=imm[2:0], y=imm[4:3])
    OP_RECV = 4'd10,  // rd = next word of input FIFO 1 (imm[0]=0) or FIFO 2 (imm[0]=1)
    OP_RWR  = 4'd11,  // remote write rd to shm addr imm[6:0] of tile (imm[9:7], imm[11:10])
    OP_RRD  = 4'd12,  // remote read request of shm addr imm[6:0] at tile (imm[9:7], imm[11:10])
    OP_DMA  = 4'd13,  // DMA: src imm[6:0], dst imm[13:7], len imm[18:14], notify imm[21:19]
    OP_BNZ  = 4'd14,  // if rs != 0 jump to imm[4:0]
    OP_NOP  = 4'd15
  } op_e;

  typedef struct packed {
    op_e         op;
    logic [2:0]  rd;
    logic [2:0]  rs;
    logic [21:0] imm;
  } instr_t;

  // Mesh coordinates of a cluster's MCore and of PCore k (0..7) of cluster c.
  function automatic logic [XW-1:0] mcore_x(input int unsigned c);
    return XW'(c * CL_COLS + 1);
  endfunction

  function automatic logic [XW-1:0] pcore_x(input int unsigned c, input int unsigned k);
    int unsigned slot;
    slot = (k >= 4) ? k + 1 : k;  // skip the MCore slot in the middle of the cluster
    return XW'(c * CL_COLS + slot % CL_COLS);
  endfunction

  function automatic logic [YW-1:0] pcore_y(input int unsigned k);
    int unsigned slot;
    slot = (k >= 4) ? k + 1 : k;
    return YW'(slot / CL_COLS);
  endfunction

endpackage
