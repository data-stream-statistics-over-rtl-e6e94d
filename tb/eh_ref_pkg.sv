// eh_ref_pkg: reference model of an exponential histogram for the
// testbenches, written independently of the RTL with SystemVerilog queues.
//
// An eh_ref object holds the end times of its buckets per level, newest
// first. insert() adds a bucket at level 'lvl' (0-based here) at time 'now'
// and cascades: at every level it touches it first drops buckets a whole
// window old, then adds the bucket, and if the level holds more than bpl
// buckets it removes the two oldest and carries the end time of the newer of
// them to the next level. It reports whether a bucket left level 'stop_lvl'
// (used to predict the spills of a pipeline that holds only some levels) and
// whether one fell off the last level.
package eh_ref_pkg;

  class eh_ref;
    int unsigned bpl;
    int unsigned nlvl;
    int unsigned q [][$];
    int unsigned n_expired = 0;   // buckets dropped for age

    function new(int unsigned bpl_i, int unsigned nlvl_i);
      bpl  = bpl_i;
      nlvl = nlvl_i;
      q    = new[nlvl_i];
    endfunction

    // insert a bucket ending at ts into level first, cascading up to (not
    // including) level stop; returns 1 and the end time if a bucket leaves
    // level stop-1.
    function bit insert(int unsigned first, int unsigned stop, int unsigned ts,
                        int unsigned now, int unsigned win, output int unsigned out_ts);
      int unsigned carry;
      carry  = ts;
      out_ts = 0;
      for (int unsigned l = first; l < stop; l++) begin
        while (q[l].size() > 0 && (now - q[l][q[l].size()-1]) >= win) begin
          void'(q[l].pop_back());
          n_expired++;
        end
        q[l].push_front(carry);
        if (q[l].size() <= bpl) return 0;
        void'(q[l].pop_back());
        carry = q[l].pop_back();
      end
      out_ts = carry;
      return 1;
    endfunction

    function int unsigned size_at(int unsigned l);
      return q[l].size();
    endfunction

    function int unsigned ts_at(int unsigned l, int unsigned i);
      return q[l][i];
    endfunction
  endclass

endpackage
