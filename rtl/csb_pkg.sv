// csb_pkg: types and constants shared by the uncached store path.
//
// The processor issues uncached operations of 1, 2, 4 or 8 bytes (a SPARC
// doubleword is the widest). Data always travels in the byte lanes of the
// naturally aligned doubleword that holds the address, with a byte-enable
// mask selecting the lanes, as on a 64-bit bus. Addresses are 64 bits wide
// because the processor follows SPARC V9; that width is this design's choice.
package csb_pkg;

  localparam int unsigned ADDR_W     = 64;  // processor address width
  localparam int unsigned WORD_BYTES = 8;   // doubleword
  localparam int unsigned WORD_W     = 8 * WORD_BYTES;

  // Memory operation kinds seen by the uncached path. SWAP is the SPARC
  // atomic swap; to combining space it acts as the conditional flush.
  typedef enum logic [1:0] {
    OP_LOAD  = 2'd0,
    OP_STORE = 2'd1,
    OP_SWAP  = 2'd2
  } mem_op_e;

  // One entry of the uncached buffer, also the single-beat request the
  // system interface turns into a bus transaction.
  typedef struct packed {
    logic                  is_load;
    logic [ADDR_W-1:0]     addr;
    logic [1:0]            size;    // log2 of the access size in bytes
    logic [WORD_W-1:0]     data;    // doubleword lanes
    logic [WORD_BYTES-1:0] be;      // byte enables within the doubleword
  } uc_req_t;

  // Byte enables of a naturally aligned access of 2**size bytes.
  function automatic logic [WORD_BYTES-1:0] size_to_be(logic [1:0] size,
                                                       logic [2:0] offs);
    logic [WORD_BYTES-1:0] m;
    unique case (size)
      2'd0: m = 8'h01;
      2'd1: m = 8'h03;
      2'd2: m = 8'h0f;
      default: m = 8'hff;
    endcase
    return m << offs;
  endfunction

endpackage
