// lbra_pkg -- types, constants and helper functions shared by the LBRA
// (Log-Based Redundant Architecture) blocks.
//
// LBRA runs a master and a slave copy of a thread. The master splits its
// work into pseudo-transactions (p-XACTs), logs the values it loads and the
// address/old value of what it stores into a circular log in memory, and
// hashes every instruction result into a CRC-32 verification signature. The
// slave re-executes each p-XACT, takes its load values from the log and
// compares signatures; matching p-XACTs are consolidated in order.
//
// Numbers taken from the design description: 16 cores (Table 3), 5 in-flight
// p-XACTs (best configuration, Sect. 6.3), 50 memory instructions per p-XACT
// (Sect. 6.3), 2048-bit R/W signatures (Sect. 6.4), 64-byte lines (Table 3),
// a 3-block log buffer (Sect. 6.6), a 10-cycle verification latency
// (Table 3), 4-byte load log entries and 8-byte store log entries (Table 3).
// Everything else here (id width, word-granular log offsets, result width,
// the modular id comparison) is this implementation's own choice.
package lbra_pkg;

  // ---------------- system size ----------------
  localparam int unsigned NCORES      = 16;  // Table 3: 16-way tiled CMP
  localparam int unsigned CORE_W      = $clog2(NCORES);
  localparam int unsigned ID_W        = 4;   // p-XACT sequence id, wraps mod 16
  localparam int unsigned NPX         = 5;   // in-flight p-XACTs (Sect. 6.3)
  localparam int unsigned PXACT_SIZE  = 50;  // memory instructions per p-XACT
  localparam int unsigned SIG_BITS    = 2048;// R/W signature bits (Sect. 6.4)
  localparam int unsigned VERIF_LAT   = 10;  // cycles (Table 3)

  // ---------------- data sizes ----------------
  localparam int unsigned ADDR_W      = 32;  // data address, as logged (Table 3: 4 bytes)
  localparam int unsigned WORD_W      = 32;  // logged data word (Table 3: 4 bytes)
  localparam int unsigned RES_W       = 64;  // instruction result hashed into the CRC
  localparam int unsigned LINE_BYTES  = 64;  // Table 3
  localparam int unsigned LINE_WORDS  = LINE_BYTES / (WORD_W / 8);
  localparam int unsigned LOGBUF_ENTRIES = 3;// Sect. 6.6

  // Log region in 32-bit words. Must be a power of two so that word offsets
  // wrap by plain overflow. 1024 words = 4 KB holds the largest log the
  // evaluation observed (2.4 KB).
  localparam int unsigned LOG_WORDS   = 1024;

  typedef logic [ID_W-1:0]   pxid_t;
  typedef logic [CORE_W-1:0] core_t;

  // One dependence field per core: valid flag and p-XACT id.
  typedef struct packed {
    logic  valid;
    pxid_t id;
  } dep_t;

  typedef dep_t [NCORES-1:0] dep_vec_t;

  // Kinds of instruction on the commit streams of master and slave.
  typedef enum logic [1:0] {
    OP_ALU   = 2'd0,
    OP_LOAD  = 2'd1,
    OP_STORE = 2'd2
  } op_kind_e;

  // One-cycle event pulses of a node, for monitoring and performance counters.
  typedef struct packed {
    logic commit;          // a p-XACT was committed by the master
    logic forced_commit;   // ... early, to keep the dependence graph acyclic
    logic stall_ctx;       // master stalled: all p-XACT contexts in use
    logic stall_log;       // master stalled: log full
    logic log_wrap;        // master log pointer wrapped to the region start
    logic consolidate;     // a p-XACT was consolidated
    logic dep_wait;        // ... after waiting for a producer
    logic lookup;          // a look-up request was sent to a producer core
    logic sig_fault;       // verification signatures differed
    logic addr_fault;      // a slave store address differed from the log
    logic wdt_timeout;     // watchdog fired
    logic recovery;        // a recovery started
    logic local_undo;      // one p-XACT was undone
    logic rb_sent;         // a rollback request was sent to a consumer
    logic prefetch;        // log buffer asked for a block ahead of the slave
    logic stale_flush;     // log buffer dropped a block read too early
    logic ls_reissue;      // lockstep mismatch, instruction reissued
  } lbra_events_t;

  // Sequence-number order modulo 2**ID_W: a is at or before b when b is
  // less than half the id space ahead of a.
  function automatic logic id_le(pxid_t a, pxid_t b);
    pxid_t d;
    d = b - a;
    return (d < pxid_t'(1 << (ID_W - 1)));
  endfunction

  // True when dependence d is covered by a last-consolidated id c.
  function automatic logic dep_done(dep_t d, dep_t c);
    return !d.valid || (c.valid && id_le(d.id, c.id));
  endfunction

endpackage
