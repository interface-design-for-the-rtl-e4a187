// gtm_pkg: types, constants and elaboration-time schedule functions shared by
// the generalized template matching (GTM) interface design.
//
// The GTM operation slides a (possibly sparse) template over an image stored
// in on-board memory. The FPGA side consists of a host interface (HI), one or
// two host-memory interfaces (HMI), a global controller (GC), multiplexers, a
// memory interface (MI) per memory port and a region function (RF), which is a
// unit function (UF, a group of basic functions) plus its RF controller.
//
// The UF timing (read cycles per port, compute cycles, write cycles) and the
// connectivity graph (which port is read, which is written) decide the loop
// pipelining. The functions at the end of this package derive the pipeline
// period and the result write slot from them, the way an interface generator
// would. Widths (32-bit memory words, 16-bit addresses, 8-bit pixels, 16-bit
// results) are this design's choices; the document leaves them to the board.
package gtm_pkg;

  // Board and data widths (assumed; the document keeps them as board parameters).
  localparam int unsigned DW       = 32;            // memory data port width
  localparam int unsigned AW       = 16;            // memory address port width
  localparam int unsigned PIX_W    = 8;             // unsigned pixel
  localparam int unsigned WGT_W    = 8;             // signed template weight
  localparam int unsigned OFF_W    = 16;            // signed template word offset
  localparam int unsigned RES_W    = 16;            // signed result per pixel
  localparam int unsigned NBF      = DW / PIX_W;    // BFs per UF (pixels per word)
  localparam int unsigned ACC_W    = 24;            // BF accumulator width
  localparam int unsigned MAX_TAPS = 16;            // template storage depth
  localparam int unsigned MEM_LAT  = 2;             // request to read data: MI register + SRAM
  localparam int unsigned HDW      = 32;            // host data width

  // Memory request between HMI/RF, the port multiplexers and the MI.
  typedef struct packed {
    logic          en;
    logic          we;
    logic [AW-1:0] addr;
    logic [DW-1:0] wdata;
  } mem_req_t;

  localparam mem_req_t MEM_REQ_IDLE = '{en: 1'b0, we: 1'b0, addr: '0, wdata: '0};

  // Host tags: the memory map from HI tags to storage types.
  typedef enum logic [2:0] {
    TAG_CMD      = 3'd0,  // write: task command to the GC
    TAG_IMAGE    = 3'd1,  // write: image word into on-board memory (via HMI)
    TAG_REGION   = 3'd2,  // write: region boundary register (RC)
    TAG_TEMPLATE = 3'd3,  // write: template tap (TC)
    TAG_RESULT   = 3'd4,  // read : result word from on-board memory (via HMI)
    TAG_STATUS   = 3'd5   // read : result summary and status (RSC)
  } tag_e;

  // GTM tasks of the operation scenario.
  typedef enum logic [2:0] {
    TASK_IDLE     = 3'd0,
    TASK_IMAGE    = 3'd1,  // T1 get image data from host
    TASK_REGION   = 3'd2,  // T2 get region boundary from host
    TASK_TEMPLATE = 3'd3,  // T3 get template from host
    TASK_COMPUTE  = 3'd4,  // T4 region function computation
    TASK_RESULT   = 3'd5   // T5 results back to host
  } task_e;

  // Multiplexer sources of a memory port.
  typedef enum logic [1:0] {
    SRC_RF   = 2'd0,
    SRC_HMI1 = 2'd1,       // HMI carrying host-to-memory traffic
    SRC_HMI2 = 2'd2,       // second HMI carrying memory-to-host traffic (split designs)
    SRC_NONE = 2'd3
  } src_e;

  // Region boundary, in memory words (one word holds NBF pixels of a row).
  typedef struct packed {
    logic [AW-1:0] row_first;
    logic [AW-1:0] row_last;
    logic [AW-1:0] col_first;   // first word column
    logic [AW-1:0] col_last;    // last word column
    logic [AW-1:0] stride;      // words per image row
    logic [AW-1:0] img_base;    // word address of image pixel (0,0)
    logic [AW-1:0] res_base;    // word address of the first result word
  } region_t;

  // ---------------------------------------------------------------------------
  // Loop-pipelining rules (elaboration time).
  // Read stage 1 uses port 0 for offsets 0..R1-1 after a start, read stage 2
  // uses port 1 for offsets R1..R1+R2-1, and the W_LEN result words go to
  // port WP. Offsets are taken modulo the pipeline period P.
  // ---------------------------------------------------------------------------

  // Offset (after the start) at which the UF presents a finished result.
  function automatic int unsigned uf_ready(int unsigned r1, int unsigned r2, int unsigned c);
    return r1 + r2 + MEM_LAT + c;
  endfunction

  // True when port `port` is busy reading at offset `off` (modulo p).
  function automatic bit read_busy(int unsigned port, int unsigned off, int unsigned p,
                                   int unsigned r1, int unsigned r2);
    for (int unsigned d = 0; d < r1 + r2; d++) begin
      if ((d % p) == (off % p)) begin
        if (port == 0 && d < r1)  return 1'b1;
        if (port == 1 && d >= r1) return 1'b1;
      end
    end
    return 1'b0;
  endfunction

  // First write start >= ready whose W_LEN slots miss every read on port wp.
  // Returns 0 when none exists within one period.
  function automatic int unsigned write_start(int unsigned p, int unsigned r1, int unsigned r2,
                                              int unsigned c, int unsigned w, int unsigned wp);
    int unsigned rdy = uf_ready(r1, r2, c);
    for (int unsigned s = rdy; s < rdy + p; s++) begin
      bit ok = 1'b1;
      for (int unsigned j = 0; j < w; j++)
        if (read_busy(wp, s + j, p, r1, r2)) ok = 1'b0;
      if (ok) return s;
    end
    return 0;
  endfunction

  // Smallest pipeline period for which reads never overlap on a port and the
  // writes fit around them.
  function automatic int unsigned pipe_period(int unsigned r1, int unsigned r2, int unsigned c,
                                              int unsigned w, int unsigned wp);
    int unsigned b0 = r1 + ((wp == 0) ? w : 0);
    int unsigned b1 = r2 + ((wp == 1) ? w : 0);
    int unsigned p  = (b0 > b1) ? b0 : b1;
    if (p == 0) p = 1;
    while (write_start(p, r1, r2, c, w, wp) == 0) p++;
    return p;
  endfunction

endpackage
