// Shared types of the multithreaded elastic primitives.
//
// eb_state_t is the three-state control of one thread's slot in a reduced
// multithreaded elastic buffer (EMPTY, HALF, FULL: number of items held, where
// FULL means the thread also owns the shared auxiliary register).
// bar_state_t is the per-thread state of the barrier (IDLE, WAIT, FREE).
// The state names follow the state diagrams of the buffer and barrier; the
// encodings are this design's choice.
package mt_pkg;

  typedef enum logic [1:0] {
    EB_EMPTY = 2'd0,
    EB_HALF  = 2'd1,
    EB_FULL  = 2'd2
  } eb_state_t;

  typedef enum logic [1:0] {
    BAR_IDLE = 2'd0,
    BAR_WAIT = 2'd1,
    BAR_FREE = 2'd2
  } bar_state_t;

endpackage
