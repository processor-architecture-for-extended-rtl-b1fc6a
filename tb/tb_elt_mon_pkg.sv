// tb_elt_mon_pkg: event counters shared by the monitors that tb_elt_top binds
// into the design's modules. Each counter is keyed by a readable name.
package tb_elt_mon_pkg;
  int cnt [string];

  function automatic void bump(input string name);
    if (cnt.exists(name)) cnt[name] = cnt[name] + 1;
    else cnt[name] = 1;
  endfunction

  function automatic int get(input string name);
    return cnt.exists(name) ? cnt[name] : 0;
  endfunction
endpackage
