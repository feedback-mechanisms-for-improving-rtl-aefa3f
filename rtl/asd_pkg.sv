// asd_pkg: types and default sizes shared by the blocks of the enhanced
// Adaptive Stream Detection (ASD) memory-side prefetcher.
//
// Sizes that the design's description fixes: the prefetch buffer holds 16
// lines, epochs are bounded to 256..8192 Read commands, a cache line is 128
// bytes and multiline prefetching fetches up to 2 lines. Everything else here
// (address width, stream filter size, longest tracked stream, base stream
// lifetime, LPQ depth, similarity threshold, Read Reorder Queue depth) is this
// implementation's own choice and is marked as such below.
package asd_pkg;

  // Cache-line address width (line = 128 B, so a 39-bit byte address).  Own choice.
  parameter int unsigned LINE_ADDR_W = 32;
  // Line size in bits (128 B lines).
  parameter int unsigned LINE_BITS   = 1024;
  // Longest stream length that the Stream Length Histogram tracks (fs).  Own choice.
  parameter int unsigned FS          = 16;
  // Width of one histogram counter.
  parameter int unsigned CNT_W       = 16;
  // Stream filter slots.  Own choice.
  parameter int unsigned SF_ENTRIES  = 8;
  // Hardware threads sharing the stream filter; its slots are split evenly
  // among them.  One thread is the main configuration; for two threads the
  // published evaluation doubles SF_ENTRIES.
  parameter int unsigned SMT_THREADS = 1;
  // Base stream lifetime t in cycles, used for streams of length 1.  Own choice.
  parameter int unsigned LIFETIME    = 512;
  // Floor under the halved lifetimes of long streams.  Own choice.
  parameter int unsigned MIN_LIFETIME = 16;
  // Lines fetched at most per multiline prefetch (m).
  parameter int unsigned MAX_LINES   = 2;
  // Prefetch buffer blocks.
  parameter int unsigned PB_BLOCKS   = 16;
  // Low Priority Queue entries.  Own choice.
  parameter int unsigned LPQ_DEPTH   = 8;
  // Read Reorder Queue entries (sets the half-full Queue Status Check).  Own choice.
  parameter int unsigned RRQ_DEPTH   = 8;
  // Epoch length bounds, in Read commands, and the length after reset (own choice).
  parameter int unsigned EPOCH_MIN   = 256;
  parameter int unsigned EPOCH_MAX   = 8192;
  parameter int unsigned EPOCH_INIT  = 1024;
  parameter int unsigned EPOCH_W     = 14;
  // Similarity threshold on the average SLH difference, in 1/256 units (64 = 0.25).  Own choice.
  parameter int unsigned SIM_THR_Q8  = 64;

  typedef logic [LINE_ADDR_W-1:0] line_addr_t;

  // Epoch-length state machine states.  GOOD_* keep the length; INC* double
  // it and DEC* halve it when they are entered.
  typedef enum logic [2:0] {
    EP_GOOD_INC = 3'd0,  // good state reached by increasing
    EP_GOOD_DEC = 3'd1,  // good state reached by decreasing
    EP_INC1     = 3'd2,
    EP_INC2     = 3'd3,
    EP_DEC1     = 3'd4,
    EP_DEC2     = 3'd5
  } epoch_state_e;

  // One-cycle event pulses that the top brings out for performance counters.
  typedef struct packed {
    logic stream_continue;   // a Read extended a tracked stream
    logic stream_alloc_evict;// a new stream displaced a live one
    logic epoch_end;         // an epoch finished and its SLH was published
    logic similar;           // similarity result: similar SLHs
    logic dissimilar;        // similarity result: dissimilar SLHs
    logic epoch_grow;        // epoch length doubled
    logic epoch_shrink;      // epoch length halved
    logic epoch_clamped;     // a change was ignored at a bound
    logic pf_single;         // one-line prefetch decided
    logic pf_multi;          // multiline prefetch decided
    logic qsc_suppress;      // Queue Status Check cut a multiline prefetch
    logic pf_in_buffer;      // a prefetch candidate was already buffered
    logic lpq_dup;           // LPQ dropped a duplicate
    logic lpq_full;          // LPQ dropped a prefetch because it was full
    logic lpq_squash;        // a regular command squashed a queued prefetch
    logic pf_issue;          // a prefetch went to DRAM
    logic reg_delayed;       // a regular command waited behind a prefetch
    logic pb_hit;            // a Read found its line in the prefetch buffer
    logic pb_evict_unused;   // an unused prefetched line was overwritten
  } asd_events_t;

endpackage
