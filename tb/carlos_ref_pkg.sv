// carlos_ref_pkg: reference models used by the testbenches, written
// independently of the RTL:
//  * gen_event     : a synthetic detector event, low noise plus a few
//                    clusters with a peak and decaying tails in both
//                    directions;
//  * ref_compress  : the two-threshold 2D rule applied to a whole event
//                    held in memory (keep at/above high, or at/above low
//                    with a 4-neighbour at/above high; otherwise zero);
//  * reconstructor : rebuilds an event from a stream of 15-bit words of one
//                    channel (the inverse of the packer).
// Events are flat arrays indexed anode * samples + time.
package carlos_ref_pkg;

  typedef byte unsigned ev_t[];

  function automatic ev_t gen_event(int anodes, int samples, int n_clusters, int noise_max);
    ev_t ev = new[anodes * samples];
    for (int i = 0; i < anodes * samples; i++) ev[i] = 8'($urandom_range(noise_max, 0));
    for (int c = 0; c < n_clusters; c++) begin
      int ca = $urandom_range(anodes - 1, 0);
      int ct = $urandom_range(samples - 1, 0);
      int pk = $urandom_range(220, 30);
      for (int da = -2; da <= 2; da++)
        for (int dt = -3; dt <= 3; dt++) begin
          int aa = ca + da, tt = ct + dt, v, d;
          if (aa < 0 || aa >= anodes || tt < 0 || tt >= samples) continue;
          d = (da < 0 ? -da : da) + (dt < 0 ? -dt : dt);
          v = pk >> d;
          if (v > ev[aa * samples + tt]) ev[aa * samples + tt] = 8'(v);
        end
    end
    return ev;
  endfunction

  function automatic ev_t ref_compress(ev_t ev, int anodes, int samples, int lo, int hi);
    ev_t o = new[anodes * samples];
    for (int a = 0; a < anodes; a++)
      for (int t = 0; t < samples; t++) begin
        int v = ev[a * samples + t];
        bit nb = 0;
        if (t > 0           && ev[a * samples + t - 1] >= hi) nb = 1;
        if (t < samples - 1 && ev[a * samples + t + 1] >= hi) nb = 1;
        if (a > 0           && ev[(a - 1) * samples + t] >= hi) nb = 1;
        if (a < anodes - 1  && ev[(a + 1) * samples + t] >= hi) nb = 1;
        o[a * samples + t] = (v >= hi || (v >= lo && nb)) ? 8'(v) : 8'd0;
      end
    return o;
  endfunction

  // Rebuilds events from the words of one channel.
  class reconstructor;
    int   anodes, samples;
    ev_t  ev;
    int   anode, tptr;
    bit   in_event;
    int   events_done;
    int   last_ev_num;
    int   last_flags;
    int   errors;        // malformed stream
    int   n_words, n_data, n_jump, n_anode;

    function new(int anodes_i, int samples_i);
      anodes = anodes_i; samples = samples_i;
      ev = new[anodes * samples];
      in_event = 0; events_done = 0; errors = 0;
      n_words = 0; n_data = 0; n_jump = 0; n_anode = 0;
    endfunction

    // returns 1 when the word closed an event (ev holds it)
    function bit push(logic [14:0] w);
      n_words++;
      if (w[13] == 1'b0) begin
        tptr += int'(w[12:8]);
        if (!in_event || anode < 0 || tptr >= samples) begin
          errors++;
          $display("reconstructor: misplaced data word %h (anode %0d time %0d)", w, anode, tptr);
          return 0;
        end
        ev[anode * samples + tptr] = w[7:0];
        tptr++;
        n_data++;
        return 0;
      end
      case (w[12:11])
        2'b10: begin
          if (in_event) begin errors++; $display("reconstructor: event start inside an event at %0t", $time); end
          foreach (ev[i]) ev[i] = 0;
          in_event = 1; anode = -1; tptr = 0;
          last_ev_num = int'(w[10:0]);
        end
        2'b00: begin anode = int'(w[7:0]); tptr = 0; n_anode++; end
        2'b01: begin tptr = int'(w[7:0]); n_jump++; end
        2'b11: begin
          if (!in_event) begin errors++; $display("reconstructor: trailer outside an event"); end
          in_event = 0;
          last_flags = int'(w[10:0]);
          events_done++;
          return 1;
        end
      endcase
      return 0;
    endfunction
  endclass

endpackage
