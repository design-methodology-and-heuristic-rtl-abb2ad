// hmpm_pkg -- shared sizes and layout functions of the hybrid macro-pipeline
// multiprocessor (HMPM).
//
// The machine has four clusters (one per upper bus) built from a linear chain
// of processing elements (PEs). Each cluster is a contiguous run of the chain,
// so the whole configuration is described by the cluster boundaries. The four
// clusters and four upper buses follow the architecture description; the
// number of PEs (16), the data width and the cycle-count width are this
// design's own choices.
//
// The functions give the power-on layout, an even split of the chain: cluster
// k owns PEs floor(k*P/C) .. floor((k+1)*P/C)-1.
package hmpm_pkg;

  parameter int unsigned HMPM_CLUSTERS = 4;   // clusters = upper buses
  parameter int unsigned HMPM_PES      = 16;  // PEs on the chain
  parameter int unsigned HMPM_DATA_W   = 32;  // data word on the buses
  parameter int unsigned HMPM_CYC_W    = 32;  // width of a subtask cycle count

  // First PE index of cluster k+1 at power-on (end of cluster k, exclusive).
  function automatic int unsigned init_boundary(int unsigned k, int unsigned pes,
                                                int unsigned clusters);
    return ((k + 1) * pes) / clusters;
  endfunction

  // Cluster that PE j belongs to at power-on.
  function automatic int unsigned init_cluster(int unsigned j, int unsigned pes,
                                               int unsigned clusters);
    int unsigned c;
    c = 0;
    for (int unsigned k = 0; k < clusters; k++)
      if (j >= init_boundary(k, pes, clusters)) c = k + 1;
    if (c > clusters - 1) c = clusters - 1;
    return c;
  endfunction

endpackage
