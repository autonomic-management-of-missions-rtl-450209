// Shared types and constants of the autonomic reconfiguration control design.
//
// Holds the state encodings of the behavioural automata (tile, battery,
// device, tracking task), the attribute table of the three tracking-task
// versions, and the row format of the scheduling table. The ten row columns
// and the meaning of -1 ("nothing to do") and -2 ("stop this DAG") follow the
// scheduling-table description; field widths are this design's choice.
// dag_node() is the DAG library used by the table generator: one DAG per
// tracking version (motion estimation -> Harris -> v KLT trackers -> object
// localizer). The node chain follows the tracking application; the tile and
// bitstream numbers are this design's choice.
package amr_pkg;

  // ---------------- scheduling table geometry ----------------
  localparam int ROW_W  = 6;   // signed row index: -2, -1, 0..31
  localparam int TILE_W = 3;   // up to 8 tiles
  localparam int FILE_W = 8;   // bitstream identifier
  localparam int CNT_W  = 4;   // countdown / dependency count
  localparam int TASK_W = 4;   // task identifier

  typedef logic signed [ROW_W-1:0] row_id_t;
  localparam row_id_t ROW_NONE = -1;  // "nothing to do"
  localparam row_id_t ROW_STOP = -2;  // ReplaceBy: stop the DAG

  // One row of the scheduling table (columns 0..9)
  typedef struct packed {
    logic [TILE_W-1:0] tile;        // 0: TileID
    logic [FILE_W-1:0] file;        // 1: FileID (bitstream)
    row_id_t           next;        // 2: next node of the same DAG
    row_id_t           load;        // 3: next node to own the tile
    row_id_t           activate;    // 4: node activated together with this one
    logic [CNT_W-1:0]  countdown;   // 5: initial countdown
    logic [CNT_W-1:0]  count;       // 6: number of dependencies
    logic [TASK_W-1:0] task_id;     // 7: task the node belongs to
    row_id_t           replace_by;  // 8: row in the next table (-1 none, -2 stop)
    logic              starting;    // 9: starting node of a DAG
  } sched_row_t;

  localparam sched_row_t EMPTY_ROW = '{tile: '0, file: '0, next: ROW_NONE,
      load: ROW_NONE, activate: ROW_NONE, countdown: '0, count: '0,
      task_id: '0, replace_by: ROW_NONE, starting: 1'b0};

  // ---------------- automata state encodings ----------------
  typedef enum logic [1:0] {TILE_OFF = 2'd0, TILE_PROCESSING = 2'd1, TILE_STORAGE = 2'd2} tile_state_e;
  typedef enum logic [1:0] {BAT_LOW = 2'd0, BAT_NORMAL = 2'd1, BAT_HIGH = 2'd2} bat_level_e;
  typedef enum logic {DEV_AVAIL = 1'b0, DEV_BUSY = 1'b1} dev_state_e;
  typedef enum logic [1:0] {SPEED_LOW = 2'd0, SPEED_NORMAL = 2'd1, SPEED_HIGH = 2'd2} speed_e;

  // ---------------- tracking task versions ----------------
  localparam int NVER  = 3;
  localparam int ATTR_W = 4;
  typedef struct packed {
    logic [ATTR_W-1:0] res;
    logic [ATTR_W-1:0] win;
    logic [ATTR_W-1:0] wcet;
  } ver_attr_t;

  // {res, win, wcet} of version v (1..3); version 0 is OFF = {0,0,0}
  function automatic ver_attr_t ver_attr(input logic [1:0] v);
    case (v)
      2'd1:    return '{res: 4'd1, win: 4'd1, wcet: 4'd5};
      2'd2:    return '{res: 4'd2, win: 4'd2, wcet: 4'd4};
      2'd3:    return '{res: 4'd3, win: 4'd1, wcet: 4'd3};
      default: return '{res: 4'd0, win: 4'd0, wcet: 4'd0};
    endcase
  endfunction

  // ---------------- DAG library of the tracking task ----------------
  // Version v has v+3 nodes, local indices:
  //   0 motion estimation  (tile 0, file 1), starting node
  //   1 Harris             (tile 1, file 2)
  //   2..v+1 KLT trackers  (tiles 2..v+1, file 2+v: one tracker bitstream
  //                         per version, started together)
  //   v+2 object localizer (tile 0, file 6): shares tile 0 with motion
  //                         estimation, so it is reloaded every iteration
  // Local row references are returned relative to the DAG's first row.
  function automatic int unsigned dag_size(input logic [1:0] v);
    return (v == 2'd0) ? 0 : int'(v) + 3;
  endfunction

  function automatic sched_row_t dag_node(input logic [1:0] v, input int unsigned i,
                                          input logic [TASK_W-1:0] task_id, input int base);
    sched_row_t r;
    int unsigned nv;
    nv = int'(v);
    r = EMPTY_ROW;
    r.task_id = task_id;
    if (i == 0) begin                       // motion estimation
      r.tile = 0; r.file = 8'd1; r.next = row_id_t'(base + 1);
      r.countdown = 0; r.count = 1; r.starting = 1'b1;
    end else if (i == 1) begin              // Harris: next = first tracker
      r.tile = 1; r.file = 8'd2; r.next = row_id_t'(base + 2);
      r.countdown = 1; r.count = 1;
    end else if (i <= nv + 1) begin         // KLT trackers, started together
      r.tile = TILE_W'(i);                  // tiles 2..v+1
      r.file = FILE_W'(2 + nv);
      r.next = row_id_t'(base + int'(nv) + 2);
      r.activate = (i < nv + 1) ? row_id_t'(base + int'(i) + 1) : ROW_NONE;
      r.countdown = 1; r.count = 1;
    end else begin                          // object localizer
      r.tile = 0; r.file = 8'd6; r.next = row_id_t'(base);
      r.countdown = CNT_W'(nv); r.count = CNT_W'(nv);
    end
    return r;
  endfunction

endpackage
