// aegis_pkg: types and constants shared by the AEGIS128 low-area core.
//
// A 128-bit value is held as 16 bytes, byte k at bits [8k+7:8k]. Byte k is
// the k-th byte of the AES state in the usual column-major order (row k%4,
// column k/4) and the k-th byte written over the 8-bit bus. The two
// initialisation constants are the ones of the AEGIS128 definition; read as
// 128-bit numbers in this byte order they are the values printed for them.
//
// The micro-instruction (uop_t) is this design's own encoding: one ALU
// operation, one operand source and one write-back target per clock.
package aegis_pkg;

  localparam logic [127:0] CONST0 = 128'h6279E990593722150D08050302010100;
  localparam logic [127:0] CONST1 = 128'hDD28B57342311120F12FC26D55183DDB;

  // Host-visible states, read in CONTROL[6:4].
  typedef enum logic [2:0] {
    ST_IDLE        = 3'd0,
    ST_LOAD_LEN    = 3'd1,
    ST_LOAD_AD     = 3'd2,
    ST_LOAD_DATA   = 3'd3,
    ST_READ_CIPHER = 3'd4,
    ST_READ_TAG    = 3'd5,
    ST_BUSY        = 3'd7
  } host_state_e;

  // CONTROL register bits.
  localparam int CTRL_DECRYPT = 0;  // R/W: 0 encrypt, 1 decrypt
  localparam int CTRL_START   = 1;  // W:   start / continue
  localparam int CTRL_BUSY    = 2;  // R:   datapath running
  localparam int CTRL_RESET   = 3;  // W:   abort, go to IDLE

  // APB register map (byte addresses).
  localparam logic [7:0] ADDR_CONTROL = 8'h00;
  localparam logic [3:0] PAGE_DATA    = 4'h1;  // 0x10-0x1F
  localparam logic [3:0] PAGE_TAG     = 4'h2;  // 0x20-0x2F

  typedef enum logic [2:0] {
    ALU_NOP  = 3'd0,
    ALU_LOAD = 3'd1,   // acc <= operand
    ALU_XOR  = 3'd2,   // acc <= acc ^ operand
    ALU_AND  = 3'd3,   // acc <= acc & operand
    ALU_SR   = 3'd4,   // acc <= ShiftRows(acc)
    ALU_MC   = 3'd5,   // column idx of acc <= MixColumn(column idx)
    ALU_SB   = 3'd6    // byte-serial SubBytes step idx (0..16)
  } alu_op_e;

  typedef enum logic [3:0] {
    SRC_S0 = 4'd0, SRC_S1 = 4'd1, SRC_S2 = 4'd2, SRC_S3 = 4'd3, SRC_S4 = 4'd4,
    SRC_DATA  = 4'd5,
    SRC_TAG   = 4'd6,
    SRC_TEMP  = 4'd7,
    SRC_C0    = 4'd8,
    SRC_C1    = 4'd9,
    SRC_MASK  = 4'd10   // valid-bit mask of the current message block
  } src_e;

  typedef enum logic [3:0] {
    DST_NONE = 4'd0,
    DST_S0 = 4'd1, DST_S1 = 4'd2, DST_S2 = 4'd3, DST_S3 = 4'd4, DST_S4 = 4'd5,
    DST_DATA = 4'd6,
    DST_TAG  = 4'd7,
    DST_TEMP = 4'd8
  } dst_e;

  typedef struct packed {
    alu_op_e    op;
    src_e       src;
    dst_e       dst;   // written with the accumulator as it is in this cycle
    logic [4:0] idx;   // byte step of SubBytes, column of MixColumns
  } uop_t;

  localparam uop_t UOP_NOP = '{op: ALU_NOP, src: SRC_S0, dst: DST_NONE, idx: 5'd0};

  // Bus write request from the APB slave into the datapath registers.
  typedef struct packed {
    logic       data_we;   // write byte into DATA
    logic       tag_we;    // write byte into TAG
    logic [3:0] idx;       // byte index
    logic [7:0] wdata;
  } bus_wr_t;

endpackage
