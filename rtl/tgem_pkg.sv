// tgem_pkg - types and constants shared by the task-graph execution manager.
//
// A task graph reaches the manager as three structures: one entry per node
// for the table of task dependencies (task_info_t), one schedule entry per
// node for the FIFO of the reconfigurable unit (RU) it is assigned to
// (sched_entry_t), and the reconfiguration sequence (rec_entry_t). Run-time
// events travel through the event queue as event_t.
//
// A node has a tag, unique inside a graph, and a configuration id: two nodes
// may run the same configuration, which is what makes reuse possible. The
// widths below are this design's choice; the event kinds and the table
// entry fields follow the manager's description.
package tgem_pkg;

  localparam int TAG_W    = 8;   // node tag
  localparam int CFG_W    = 8;   // configuration (bitstream) id
  localparam int MAX_SUCC = 4;   // successors held per table entry
  localparam int CNT_W    = 4;   // predecessor / successor counters
  localparam int CYC_W    = 32;  // reconfiguration and execution cycle counts
  localparam int RU_W     = 4;   // RU index (up to 16 units)

  typedef logic [TAG_W-1:0] tag_t;
  typedef logic [CFG_W-1:0] cfg_t;
  typedef logic [CNT_W-1:0] cnt_t;
  typedef logic [CYC_W-1:0] cyc_t;
  typedef logic [RU_W-1:0]  ru_idx_t;

  // Run-time events handled by the control unit.
  typedef enum logic [1:0] {
    EV_NEW_GRAPH  = 2'd0,
    EV_END_EXEC   = 2'd1,
    EV_END_RECONF = 2'd2,
    EV_REUSED     = 2'd3
  } ev_code_e;

  typedef struct packed {
    ev_code_e code;
    tag_t     tag;
    ru_idx_t  ru;
  } event_t;

  // Unit state register of an RU.
  //   FREE   : nothing waiting to execute; may be reconfigured
  //   RECONF : being reconfigured
  //   LOADED : holds a task that has not yet executed
  //   EXEC   : executing
  typedef enum logic [1:0] {
    RU_FREE   = 2'd0,
    RU_RECONF = 2'd1,
    RU_LOADED = 2'd2,
    RU_EXEC   = 2'd3
  } ru_state_e;

  // Contents of one entry of the table of task dependencies.
  typedef struct packed {
    tag_t                    tag;
    cnt_t                    pred_cnt;  // unresolved dependencies
    cnt_t                    num_succ;
    tag_t [MAX_SUCC-1:0]     succ;      // succ[0] is successor 1
  } task_info_t;

  // One task in the execution sequence of an RU.
  typedef struct packed {
    tag_t tag;
    cfg_t cfg;
    cyc_t rec_cycles;
    cyc_t exec_cycles;
  } sched_entry_t;

  // One step of the reconfiguration sequence.
  typedef struct packed {
    tag_t    tag;
    ru_idx_t ru;
  } rec_entry_t;

  // Graph description records sent by the processor.
  typedef enum logic [1:0] {
    REC_TASK   = 2'd0,  // info    -> table of task dependencies
    REC_SCHED  = 2'd1,  // ru,sched -> schedule FIFO of RU 'ru'
    REC_RECONF = 2'd2,  // info.tag, ru -> reconfiguration FIFO
    REC_END    = 2'd3   // num_tasks; graph complete, raise new-graph event
  } rec_kind_e;

  typedef struct packed {
    rec_kind_e    kind;
    ru_idx_t      ru;
    task_info_t   info;
    sched_entry_t sched;
    tag_t         num_tasks;
  } graph_rec_t;

endpackage
