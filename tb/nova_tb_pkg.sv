// nova_tb_pkg: counters filled by the probes that the end-to-end testbench
// binds into the network, so the testbench can check that each internal
// mechanism occurred.
package nova_tb_pkg;
  int ring_fwd    = 0;   // ring transfers whose packet the receiver forwards on
  int up_conflict = 0;   // clocks with several tiles of a cluster asking for the uplink
  int cs_block    = 0;   // clocks with a cluster switch input refusing a packet

  function automatic void clear();
    ring_fwd    = 0;
    up_conflict = 0;
    cs_block    = 0;
  endfunction
endpackage
