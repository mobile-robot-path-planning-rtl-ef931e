// bf_ref_pkg: reference model of one planning operation, for the testbenches.
//
// plan() takes an initial map (cell codes, row by row, COLS wide), a start
// and a goal cell, and performs in plain software what the hardware does:
// breadth-first search in N, S, W, E order from the start, marking each cell
// visited when it is enqueued and recording the direction back to the cell
// that reached it; the search stops when the goal is dequeued or the queue
// runs dry. If the goal was reached, the cells from the goal back to the
// start are given the path code. It returns the final map, the directions,
// whether the goal was found, the number of cells expanded (dequeued and not
// the goal) and the number of path cells.
package bf_ref_pkg;
  import bf_pkg::*;

  typedef logic [1:0] word_t;

  typedef struct {
    word_t map [];
    word_t dir [];
    bit    reached [];
    bit    found;
    int    expanded;
    int    path_len;
    int    path_dist;
  } result_t;

  function automatic result_t plan(input word_t init [], input int cols,
                                   input int s, input int g);
    result_t r;
    int q[$];
    int prev [];
    int c, n;
    r.map = new[init.size()];
    r.dir = new[init.size()];
    r.reached = new[init.size()];
    prev = new[init.size()];
    foreach (init[a]) begin
      r.map[a] = init[a];
      r.dir[a] = 2'd0;
      r.reached[a] = 0;
      prev[a] = -1;
    end
    r.found = 0;
    r.expanded = 0;
    r.path_len = 0;
    r.path_dist = -1;
    r.map[s] = CELL_VISITED;
    r.reached[s] = 1;
    q.push_back(s);
    while (q.size() > 0) begin
      c = q.pop_front();
      if (c == g) begin
        r.found = 1;
        break;
      end
      r.expanded++;
      for (int d = 0; d < 4; d++) begin
        n = (d == 0) ? c - cols : (d == 1) ? c + cols : (d == 2) ? c - 1 : c + 1;
        if (r.map[n] == CELL_FREE) begin
          r.map[n] = CELL_VISITED;
          r.reached[n] = 1;
          r.dir[n] = 2'(d ^ 1);
          prev[n] = c;
          q.push_back(n);
        end
      end
    end
    if (r.found) begin
      c = g;
      while (c != -1) begin
        r.map[c] = CELL_PATH;
        r.path_len++;
        c = prev[c];
      end
      r.path_dist = r.path_len - 1;
    end
    return r;
  endfunction
endpackage
