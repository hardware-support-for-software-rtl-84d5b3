// nxa_pkg: types and constants shared by the NXA inter-core hardware.
//
// NXA couples two out-of-order cores (P0 runs the main thread, P1 runs
// spawned work threads). The register update mask has one bit per
// architectural register of an Alpha core: 32 integer, 32 floating point
// and 12 special registers, 76 in all, as the design specifies. Widths of
// program counters, physical register numbers, spawn sequence numbers and
// memory-operation age tags are this implementation's own choices.
package nxa_pkg;

  localparam int unsigned NUM_AREGS = 76;   // register update mask width
  localparam int unsigned AREG_W    = 7;    // clog2(76)
  localparam int unsigned PC_W      = 64;   // Alpha virtual address
  localparam int unsigned XLEN      = 64;   // Alpha register width
  localparam int unsigned PREG_W    = 9;    // up to 512 physical registers
  localparam int unsigned SEQ_W     = 16;   // spawn sequence number
  localparam int unsigned AGE_W     = 16;   // per-core program-order tag
  localparam int unsigned ADDR_W    = 64;   // memory address

  typedef logic [NUM_AREGS-1:0] regmask_t;
  typedef logic [AREG_W-1:0]    areg_t;
  typedef logic [PREG_W-1:0]    preg_t;
  typedef logic [SEQ_W-1:0]     seq_t;
  typedef logic [AGE_W-1:0]     age_t;
  typedef logic [XLEN-1:0]      word_t;
  typedef logic [PC_W-1:0]      pc_t;
  typedef logic [ADDR_W-1:0]    addr_t;

  // Spawn request pushed by a pbr/pbrnc at P0 rename.
  typedef struct packed {
    pc_t      target;   // spawn target PC
    regmask_t mask;     // registers P0 updated since the previous spawn
    logic     checked;  // 1 = pbr, 0 = pbrnc
    seq_t     id;       // spawn sequence number (first spawn is 1)
  } spawn_t;

  // Endblock notice sent by a pjn at P1 rename.
  typedef struct packed {
    regmask_t mask;     // registers the work thread updated
    logic     checked;  // the originating spawn was a pbr
    seq_t     id;       // originating spawn
  } endblock_t;

  // Request for an architectural register value held by the other core.
  typedef struct packed {
    seq_t  silo_id;     // which spawn/endblock point the value belongs to
    areg_t areg;        // architectural register wanted
    preg_t dst;         // requester's physical register to write
  } reg_req_t;

  // Register value travelling back to the requester.
  typedef struct packed {
    preg_t dst;
    word_t data;
  } reg_data_t;

  // Logical order of a memory operation in the single original thread:
  // a P0 operation issued after k spawns follows work thread k and
  // precedes work thread k+1; age orders operations of one core.
  typedef struct packed {
    seq_t seq;
    logic p0;
    age_t age;
  } mem_key_t;

  typedef struct packed {
    logic     store;
    mem_key_t key;
    addr_t    addr;
    word_t    data;     // store data, unused for loads
  } mem_op_t;

  // Modular comparisons so that counters may wrap.
  function automatic logic seq_before(seq_t a, seq_t b);
    seq_t d;
    d = a - b;
    return d[SEQ_W-1];
  endfunction

  function automatic logic age_before(age_t a, age_t b);
    age_t d;
    d = a - b;
    return d[AGE_W-1];
  endfunction

  // a precedes b in the logical program order
  function automatic logic key_before(mem_key_t a, mem_key_t b);
    if (a.seq != b.seq) return seq_before(a.seq, b.seq);
    if (a.p0 != b.p0)   return !a.p0;
    return age_before(a.age, b.age);
  endfunction

endpackage
